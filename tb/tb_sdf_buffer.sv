// tb_sdf_buffer: drives random words with random shift enables into a 64-cell
// and a 5-cell delay line and checks that each output equals the word written
// exactly L shifts earlier (zero before L shifts after reset), and that the
// output does not change on cycles without a shift.
module tb_sdf_buffer;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [10:0] d_re, d_im, q64_re, q64_im, q5_re, q5_im;

  sdf_buffer          u64 (.clk, .rst_n, .shift_en(en), .d_re, .d_im, .q_re(q64_re), .q_im(q64_im));
  sdf_buffer #(.L(5)) u5  (.clk, .rst_n, .shift_en(en), .d_re, .d_im, .q_re(q5_re),  .q_im(q5_im));

  always #5 clk = ~clk;

  logic [21:0] hist[$];   // every word shifted in, oldest first

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [21:0] expect_at(int l);
    int n = hist.size();
    return (n >= l) ? hist[n - l] : 22'd0;
  endfunction

  initial begin
    logic [21:0] e64, e5, prev64;
    d_re = '0; d_im = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 1500; cyc++) begin
      @(negedge clk);
      e64 = expect_at(64);
      e5  = expect_at(5);
      checks += 2;
      if ({q64_re, q64_im} !== e64) begin failures++; $display("FAIL L=64 cycle %0d", cyc); end
      if ({q5_re,  q5_im}  !== e5)  begin failures++; $display("FAIL L=5 cycle %0d", cyc);  end
      prev64 = {q64_re, q64_im};
      en   = ($urandom_range(0, 3) != 0);
      d_re = 11'($urandom);
      d_im = 11'($urandom);
      @(posedge clk);
      if (en) hist.push_back({d_re, d_im});
      else begin
        #1;
        checks++;
        if ({q64_re, q64_im} !== prev64) begin failures++; $display("FAIL moved without shift"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
