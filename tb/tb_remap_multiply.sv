// tb_remap_multiply: drives random bracketing samples, fractions and scalers
// and compares each output with A * (v0 + (v1 - v0) * frac) evaluated in real
// arithmetic (tolerance 2 LSB), including the edge fractions 0 and 1-2^-12.
// Checks the 2-cycle latency.
module tb_remap_multiply;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NS = 300;

  logic in_valid, out_valid;
  logic signed [15:0] v0_re, v0_im, v1_re, v1_im, a, out_re, out_im;
  logic [11:0] frac;
  remap_multiply #(.W(16), .FR(14), .MF(12)) dut (.*);

  real er[NS], ei[NS];
  int got = 0, cyc = 0, first_out = -1;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      real gr, gi;
      if (first_out < 0) first_out = cyc;
      gr = out_re / 16384.0; gi = out_im / 16384.0;
      checks++;
      if ((gr-er[got]) > 2.0/16384 || (er[got]-gr) > 2.0/16384 ||
          (gi-ei[got]) > 2.0/16384 || (ei[got]-gi) > 2.0/16384) begin
        failures++;
        $display("FAIL %0d got (%f,%f) exp (%f,%f)", got, gr, gi, er[got], ei[got]);
      end
      got++;
    end
  end

  function automatic int rq();
    return int'($urandom_range(0, 32768)) - 16384;
  endfunction

  initial begin
    int start_cyc;
    in_valid = 0; {v0_re, v0_im, v1_re, v1_im, a} = '0; frac = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); start_cyc = cyc;
    for (int s = 0; s < NS; s++) begin
      int p0r, p0i, p1r, p1i, f, s_a; real ip_r, ip_i;
      p0r = rq(); p0i = rq(); p1r = rq(); p1i = rq(); s_a = rq();
      f = int'($urandom_range(0, 4095));
      if (s == 0) f = 0;
      if (s == 1) f = 4095;
      ip_r = p0r/16384.0 + (p1r - p0r)/16384.0 * f / 4096.0;
      ip_i = p0i/16384.0 + (p1i - p0i)/16384.0 * f / 4096.0;
      er[s] = ip_r * s_a / 16384.0; ei[s] = ip_i * s_a / 16384.0;
      in_valid = 1; v0_re = 16'(p0r); v0_im = 16'(p0i); v1_re = 16'(p1r); v1_im = 16'(p1i);
      frac = 12'(f); a = 16'(s_a);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (got != NS) begin failures++; $display("FAIL count %0d", got); end
    checks++;
    if (first_out - start_cyc != 2) begin failures++; $display("FAIL latency %0d", first_out - start_cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
