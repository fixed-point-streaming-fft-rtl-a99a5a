// tb_twiddle_rom: checks every entry of the twiddle table for three stage
// sizes against cos/sin computed in the testbench, and a few factors whose
// values are known exactly (1, -j, (1-j)/sqrt(2)).
module tb_twiddle_rom;
  import fft_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [5:0]        a64;
  logic [1:0]        a4;
  logic [0:0]        a1;
  logic signed [9:0] r64, i64, r4, i4, r1, i1;

  twiddle_rom                u64 (.addr(a64), .tw_re(r64), .tw_im(i64));
  twiddle_rom #(.L(4))       u4  (.addr(a4),  .tw_re(r4),  .tw_im(i4));
  twiddle_rom #(.L(1))       u1  (.addr(a1),  .tw_re(r1),  .tw_im(i1));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cpx_t t;
    for (int k = 0; k < 64; k++) begin
      a64 = 6'(k);
      #1;
      t = twiddle(k, 64, 8);
      check($sformatf("L=64 re[%0d]", k), r64, t.re);
      check($sformatf("L=64 im[%0d]", k), i64, t.im);
      if (k == 0)  begin check("W^0 re", r64, 256);  check("W^0 im", i64, 0);    end
      if (k == 16) begin check("W^16 re", r64, 181); check("W^16 im", i64, -181); end
      if (k == 32) begin check("W^32 re", r64, 0);   check("W^32 im", i64, -256); end
    end
    for (int k = 0; k < 4; k++) begin
      a4 = 2'(k);
      #1;
      t = twiddle(k, 4, 8);
      check($sformatf("L=4 re[%0d]", k), r4, t.re);
      check($sformatf("L=4 im[%0d]", k), i4, t.im);
    end
    a1 = 1'b0;
    #1;
    check("L=1 re", r1, 256);
    check("L=1 im", i1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
