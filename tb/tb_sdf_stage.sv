// tb_sdf_stage: streams random samples, with random gaps in in_valid, into
// stages with buffer lengths 4, 1 and 64 (4.7 words in and out), 2 (2.8 words
// aligned to 3.9) and 8 (4.7 words truncated and saturated to 3.5). Each
// input is first aligned to the stage format by the reference model. The expected output stream is built
// block by block with the reference butterfly: for every block of 2L inputs,
// the L scaled sums and then the L twiddled, scaled differences. Every output
// must match in order, appear exactly one cycle after an accepted input, and
// the first output must come with the (L+1)-th input.
module tb_sdf_stage;
  import fft_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [10:0] in_re, in_im;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NL = 5;
  localparam int LS[NL] = '{4, 1, 64, 2, 8};
  localparam int SW[NL] = '{11, 11, 11, 12, 8};   // stage word
  localparam int SF[NL] = '{7, 7, 7, 9, 5};       // stage fraction bits
  localparam int IW[NL] = '{11, 11, 11, 10, 11};  // input word
  localparam int IF[NL] = '{7, 7, 7, 8, 7};       // input fraction bits

  logic               ov [NL];
  logic signed [11:0] ore[NL], oim[NL];
  logic               osat[NL];

  for (genvar g = 0; g < NL; g++) begin : g_dut
    logic signed [SW[g]-1:0] o_re, o_im;
    sdf_stage #(.L(LS[g]), .W(SW[g]), .FRAC(SF[g]), .IN_W(IW[g]), .IN_FRAC(IF[g])) dut (
      .clk, .rst_n, .in_valid, .in_re(in_re[IW[g]-1:0]), .in_im(in_im[IW[g]-1:0]),
      .out_valid(ov[g]), .out_re(o_re), .out_im(o_im), .sat(osat[g]));
    assign ore[g] = 12'(o_re);
    assign oim[g] = 12'(o_im);
  end

  cpx_t inputs[NL][$];
  cpx_t expq[NL][$];
  int   got_n[NL];
  int   accepted = 0;
  bit   prev_acc = 0;

  // Extend the expected stream of stage g after each accepted input: a sample
  // in the second half of a block completes a pair, whose sum is expected
  // next; the pair's difference is held until the block is complete.
  cpx_t pend[NL][$];
  task automatic extend_expect(int g);
    int   l, pos, base, sc;
    cpx_t s, d;
    l   = LS[g];
    pos = (inputs[g].size() - 1) % (2 * l);
    if (pos < l) return;
    base = inputs[g].size() - 1 - pos;
    butterfly(inputs[g][base + pos - l], inputs[g][base + pos], twiddle(pos - l, l, 8), 181,
              SW[g], 8, s, d, sc);
    expq[g].push_back(s);
    pend[g].push_back(d);
    if (pos == 2 * l - 1) begin
      foreach (pend[g][i]) expq[g].push_back(pend[g][i]);
      pend[g].delete();
    end
  endtask

  always @(posedge clk) prev_acc <= in_valid;
  int narrow_sat = 0;
  always @(posedge clk) if (osat[4]) narrow_sat++;

  // Output checker
  always @(negedge clk) if (rst_n) begin
    for (int g = 0; g < NL; g++) begin
      checks++;
      if (ov[g] !== (prev_acc && accepted > LS[g])) begin
        failures++;
        $display("FAIL L=%0d out_valid=%0d at accepted=%0d", LS[g], ov[g], accepted);
      end
      if (ov[g]) begin
        cpx_t e;
        checks++;
        if (expq[g].size() == 0) begin
          failures++; $display("FAIL L=%0d output with nothing expected", LS[g]);
        end else begin
          e = expq[g].pop_front();
          if (ore[g] != e.re || oim[g] != e.im) begin
            failures++;
            $display("FAIL L=%0d out %0d: got %0d,%0d expected %0d,%0d",
                     LS[g], got_n[g], ore[g], oim[g], e.re, e.im);
          end
        end
        got_n[g]++;
      end
    end
  end

  initial begin
    in_re = '0; in_im = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      if ($urandom_range(0, 7) == 0) begin   // occasionally full-scale words
        in_re = 11'($urandom);
        in_im = 11'($urandom);
      end else begin
        in_re = 11'($signed(9'($urandom)));
        in_im = 11'($signed(9'($urandom)));
      end
      @(posedge clk);
      if (in_valid) begin
        accepted++;
        for (int g = 0; g < NL; g++) begin
          int     sc = 0;
          longint r, i;
          // the input as the stage sees it: the low IW bits, aligned to its format
          r = longint'(in_re) <<< (64 - IW[g]) >>> (64 - IW[g]);
          i = longint'(in_im) <<< (64 - IW[g]) >>> (64 - IW[g]);
          inputs[g].push_back('{align(r, IF[g], SW[g], SF[g], sc), align(i, IF[g], SW[g], SF[g], sc)});
          extend_expect(g);
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (2) @(negedge clk);
    for (int g = 0; g < NL; g++) begin
      // every accepted sample after the first L produces one output
      automatic int exp_n = (accepted > LS[g]) ? accepted - LS[g] : 0;
      checks++;
      if (got_n[g] != exp_n) begin
        failures++;
        $display("FAIL L=%0d produced %0d outputs, expected %0d", LS[g], got_n[g], exp_n);
      end
    end
    checks++;
    if (narrow_sat == 0) begin failures++; $display("FAIL saturation never flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
