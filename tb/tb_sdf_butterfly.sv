// tb_sdf_butterfly: compares the butterfly with the integer reference model
// for random operands and twiddles, for both scale modes, including operands
// large enough to saturate. Also checks two results worked out by hand.
module tb_sdf_butterfly;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  int checks = 0, failures = 0, sat_seen = 0;

  logic signed [10:0] a_re, a_im, b_re, b_im;
  logic signed [9:0]  tw_re, tw_im;
  logic signed [10:0] s_re, s_im, d_re, d_im, h_sre, h_sim, h_dre, h_dim;
  logic               sat, h_sat;

  sdf_butterfly dut (.a_re, .a_im, .b_re, .b_im, .tw_re, .tw_im,
                     .sum_re(s_re), .sum_im(s_im), .diff_re(d_re), .diff_im(d_im), .sat);
  sdf_butterfly #(.SCALE(SCALE_HALF)) dut_half (.a_re, .a_im, .b_re, .b_im, .tw_re, .tw_im,
                     .sum_re(h_sre), .sum_im(h_sim), .diff_re(h_dre), .diff_im(h_dim), .sat(h_sat));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (a=%0d,%0d b=%0d,%0d tw=%0d,%0d)",
               what, got, exp, a_re, a_im, b_re, b_im, tw_re, tw_im);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_and_check();
    cpx_t a, b, t, s, d;
    int   sc;
    #1;
    a = '{a_re, a_im}; b = '{b_re, b_im}; t = '{tw_re, tw_im};
    sc = 0;
    butterfly(a, b, t, 181, 11, 8, s, d, sc);
    check("sum.re", s_re, s.re);  check("sum.im", s_im, s.im);
    check("dif.re", d_re, d.re);  check("dif.im", d_im, d.im);
    check("sat", sat, sc != 0);
    if (sc != 0) sat_seen++;
    sc = 0;
    butterfly(a, b, t, 128, 11, 8, s, d, sc);
    check("half sum.re", h_sre, s.re);  check("half sum.im", h_sim, s.im);
    check("half dif.re", h_dre, d.re);  check("half dif.im", h_dim, d.im);
    check("half sat", h_sat, sc != 0);
  endtask

  initial begin
    cpx_t t;
    // Hand-worked: a = 1.0, b = 0.5 (x128), tw = 1: sum = 1.5*181/256 -> 192*181>>8 = 135
    // diff = 0.5 -> 64*181>>8 = 45; with 1/2 scaling: 96 and 32.
    a_re = 128; a_im = 0; b_re = 64; b_im = 0; tw_re = 256; tw_im = 0;
    #1;
    check("hand sum",  s_re, 135);  check("hand dif",  d_re, 45);
    check("hand hsum", h_sre, 96);  check("hand hdif", h_dre, 32);
    // Hand-worked: a = 0, b = -1.0 (x128), tw = -j: diff = (1.0)(-j) -> im = -128 -> *181>>8 = -91
    a_re = 0; b_re = -128; tw_re = 0; tw_im = -256;
    #1;
    check("hand -j re", d_re, 0);   check("hand -j im", d_im, -91);
    for (int i = 0; i < 3000; i++) begin
      // mostly moderate operands, sometimes full-scale ones
      if ($urandom_range(0, 3) == 0) begin
        a_re = 11'($urandom); a_im = 11'($urandom); b_re = 11'($urandom); b_im = 11'($urandom);
      end else begin
        a_re = 11'($signed(8'($urandom))); a_im = 11'($signed(8'($urandom)));
        b_re = 11'($signed(8'($urandom))); b_im = 11'($signed(8'($urandom)));
      end
      t = twiddle($urandom_range(0, 63), 64, 8);
      tw_re = 10'(t.re); tw_im = 10'(t.im);
      apply_and_check();
    end
    // extreme corners
    a_re = 1023; a_im = 1023; b_re = -1024; b_im = -1024; tw_re = 181; tw_im = -181;
    apply_and_check();
    a_re = -1024; a_im = -1024; b_re = -1024; b_im = -1024; tw_re = 256; tw_im = 0;
    apply_and_check();
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("saturating cases: %0d", sat_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
