// tb_magnitude: streams random Q1.22 complex samples (plus the corner cases
// 0, -1 and (-1,-1)) through the pipelined envelope unit and compares each
// result with floor(sqrt(re^2 + im^2)) computed with 64-bit integer
// arithmetic. Checks the W + 1 cycle latency.
module tb_magnitude;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NS = 300, W = 24;

  logic in_valid, out_valid;
  logic signed [W-1:0] re, im;
  logic [W-1:0] mag;
  magnitude #(.W(W)) dut (.*);

  longint unsigned exp_q[NS];
  int got = 0, cyc = 0, first_out = -1;

  function automatic longint unsigned isqrt(longint unsigned x);
    longint unsigned r = 0;
    for (int b = 31; b >= 0; b--) begin
      longint unsigned t = r | (64'd1 << b);
      if (t * t <= x) r = t;
    end
    return r;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      if (first_out < 0) first_out = cyc;
      checks++;
      if (64'(mag) != exp_q[got]) begin
        failures++; $display("FAIL %0d got %0d exp %0d", got, mag, exp_q[got]);
      end
      got++;
    end
  end

  initial begin
    int start_cyc;
    in_valid = 0; re = 0; im = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); start_cyc = cyc;
    for (int s = 0; s < NS; s++) begin
      longint r, i;
      r = longint'($urandom_range(0, 1 << 23)) - (1 << 22);
      i = longint'($urandom_range(0, 1 << 23)) - (1 << 22);
      if (s == 0) begin r = 0; i = 0; end
      if (s == 1) begin r = -(1 << 22); i = 0; end
      if (s == 2) begin r = -(1 << 22); i = -(1 << 22); end
      exp_q[s] = isqrt(64'(r*r + i*i));
      in_valid = 1; re = W'(r); im = W'(i);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (W + 4) @(negedge clk);
    checks++;
    if (got != NS) begin failures++; $display("FAIL count %0d", got); end
    checks++;
    if (first_out - start_cyc != W + 1) begin failures++; $display("FAIL latency %0d", first_out - start_cyc); end
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
