// sdf_buffer: the feedback delay line of one SDF stage.
//
// A chain of L complex registers (cells 1 .. L). When shift_en is high the
// word at d_re/d_im enters cell 1 and every cell moves one place towards cell
// L; q_re/q_im always show cell L, so a word comes back out exactly L accepted
// samples after it went in. Nothing moves while shift_en is low, which lets
// the whole pipeline pause when no input sample arrives.
//
// The shift-register form follows the stage drawing (a row of cells 1 .. v);
// the reset to zero is this design's choice (synchronous, active low).
module sdf_buffer #(
  parameter int L = 64,
  parameter int W = fft_pkg::DEF_DATA_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift_en,
  input  logic signed [W-1:0] d_re,
  input  logic signed [W-1:0] d_im,
  output logic signed [W-1:0] q_re,
  output logic signed [W-1:0] q_im
);

  typedef struct packed {
    logic signed [W-1:0] re;
    logic signed [W-1:0] im;
  } cplx_t;

  cplx_t cells [L];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < L; i++) cells[i] <= '0;
    end else if (shift_en) begin
      cells[0] <= '{re: d_re, im: d_im};
      for (int i = 1; i < L; i++) cells[i] <= cells[i-1];
    end
  end

  assign q_re = cells[L-1].re;
  assign q_im = cells[L-1].im;

endmodule
