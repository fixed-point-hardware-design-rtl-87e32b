// fft_bfp: N-point complex FFT with per-element binary scaling.
//
// The transform runs in place on an internal dual-port memory holding, for
// each of the N points, a real part, an imaginary part and a scaling factor
// (the point's true value is the stored value times 2^s). Loading writes a
// point with factor 0. A start pulse then runs log2(N) radix-2
// decimation-in-frequency stages, one butterfly every two clock cycles: one
// cycle reads both operands (both memory ports), the next writes both results.
//
// Each butterfly follows the document's scaling rule: both inputs are first
// equalised to the larger of their two factors, the butterfly is computed in
// wider precision, and each output is then shifted right by 0..4 bits,
// chosen from max(|re|,|im|) against 1, 2, 4 and 8, so that every stored
// value stays inside [-1, +1]; its factor grows by the same amount. The
// largest factor written by the last stage is reported on 'smax'.
//
// After 'done', two independent read ports return the spectrum in natural
// bin order (the bit-reversed storage order is undone on the address) with
// one cycle of latency, every point already equalised to 'smax'. An inverse
// transform is obtained by the caller conjugating input and output.
//
// The document uses a split-radix FFT with L-shaped butterflies. This block
// computes the same transform with radix-2 butterflies, which keeps the
// address sequencing simple; the scaling rule is applied per butterfly in the
// same way. Twiddle factors are Q1.14 as in the document and are computed at
// elaboration as round(2^14 cos(2 pi k/N)) and round(2^14 sin(2 pi k/N)),
// k = 0..N/2-1. Every shift rounds to nearest (stolt_pkg::sra_round).
//
// Timing: a transform takes N/2 * log2(N) * 2 + 2 cycles from 'start' to 'done'.
module fft_bfp
  import stolt_pkg::*;
#(
  parameter int unsigned N    = 4096,
  parameter int unsigned W    = 16,   // data word
  parameter int unsigned FRAC = 14    // fraction bits of the data word
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // load port (natural order, factor 0)
  input  logic                 in_we,
  input  logic [$clog2(N)-1:0] in_addr,
  input  logic signed [W-1:0]  in_re,
  input  logic signed [W-1:0]  in_im,
  // control
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output scale_t               smax,
  // two read ports, natural bin order, 1-cycle latency, equalised to smax
  input  logic [$clog2(N)-1:0] rd_addr_a,
  output logic signed [W-1:0]  rd_re_a,
  output logic signed [W-1:0]  rd_im_a,
  input  logic [$clog2(N)-1:0] rd_addr_b,
  output logic signed [W-1:0]  rd_re_b,
  output logic signed [W-1:0]  rd_im_b
);
  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned XW   = W + 4;          // butterfly working width
  localparam int unsigned TWW  = TW_FR + 2;

  logic signed [W-1:0]   mem_re [N];
  logic signed [W-1:0]   mem_im [N];
  scale_t                mem_s  [N];

  logic signed [TWW-1:0] tw_cos [N/2];
  logic signed [TWW-1:0] tw_sin [N/2];

  initial begin
    for (int k = 0; k < int'(N/2); k++) begin
      tw_cos[k] = TWW'($rtoi($floor($cos(2.0 * 3.14159265358979323846 * k / N) * (2.0 ** TW_FR) + 0.5)));
      tw_sin[k] = TWW'($rtoi($floor($sin(2.0 * 3.14159265358979323846 * k / N) * (2.0 ** TW_FR) + 0.5)));
    end
  end

  typedef enum logic [1:0] {IDLE, RD, WR} state_t;
  state_t state;

  logic [$clog2(LOGN+1)-1:0] stage;
  logic [LOGN-1:0]           bf;      // butterfly counter, N/2 per stage (MSB unused)
  logic [LOGN-1:0]           i0, i1, i0_r, i1_r;
  logic [LOGN-1:0]           twk;
  logic [LOGN-1:0]           half;

  // operand registers
  logic signed [W-1:0]   a_re, a_im, b_re, b_im;
  scale_t                a_s, b_s;
  logic signed [TWW-1:0] c_r, s_r;

  // Insert a 0 at bit position (LOGN-1-stage) of the butterfly counter.
  always_comb begin
    logic [LOGN-1:0] lowmask;
    half    = LOGN'(1) << (LOGN - 1 - stage);
    lowmask = half - 1'b1;
    i0      = ((bf & ~lowmask) << 1) | (bf & lowmask);
    i1      = i0 | half;
    twk     = (bf & lowmask) << stage;
  end

  // ---------------- butterfly datapath ----------------
  scale_t                sI, n0_s, n1_s;
  logic signed [XW-1:0]  ea_re, ea_im, eb_re, eb_im;
  logic signed [XW-1:0]  sum_re, sum_im, dif_re, dif_im;
  logic signed [XW+TWW:0] pr, pi;
  logic signed [XW-1:0]  t_re, t_im;
  logic signed [W-1:0]   n0_re, n0_im, n1_re, n1_im;

  function automatic logic [2:0] out_shift(input logic signed [XW-1:0] re,
                                           input logic signed [XW-1:0] im);
    logic [XW-1:0] ar, ai, m;
    ar = re[XW-1] ? XW'(-re) : XW'(re);
    ai = im[XW-1] ? XW'(-im) : XW'(im);
    m  = (ar > ai) ? ar : ai;
    if (m <= (XW'(1) << FRAC))      return 3'd0;
    if (m <= (XW'(1) << (FRAC+1)))  return 3'd1;
    if (m <= (XW'(1) << (FRAC+2)))  return 3'd2;
    if (m <= (XW'(1) << (FRAC+3)))  return 3'd3;
    return 3'd4;
  endfunction

  always_comb begin
    logic [2:0] d0, d1;
    sI    = max_scale(a_s, b_s);
    ea_re = XW'(sra_round(48'(a_re), sI - a_s));
    ea_im = XW'(sra_round(48'(a_im), sI - a_s));
    eb_re = XW'(sra_round(48'(b_re), sI - b_s));
    eb_im = XW'(sra_round(48'(b_im), sI - b_s));
    sum_re = ea_re + eb_re;
    sum_im = ea_im + eb_im;
    dif_re = ea_re - eb_re;
    dif_im = ea_im - eb_im;
    // (dr + j di) * (c - j s)
    pr   = (XW+TWW+1)'(dif_re * c_r) + (XW+TWW+1)'(dif_im * s_r);
    pi   = (XW+TWW+1)'(dif_im * c_r) - (XW+TWW+1)'(dif_re * s_r);
    t_re = XW'(sra_round(48'(pr), TW_FR));
    t_im = XW'(sra_round(48'(pi), TW_FR));
    d0    = out_shift(sum_re, sum_im);
    d1    = out_shift(t_re, t_im);
    n0_re = W'(sra_round(48'(sum_re), d0));
    n0_im = W'(sra_round(48'(sum_im), d0));
    n1_re = W'(sra_round(48'(t_re), d1));
    n1_im = W'(sra_round(48'(t_im), d1));
    n0_s  = sI + scale_t'(d0);
    n1_s  = sI + scale_t'(d1);
  end

  // ---------------- control and memory ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      stage <= '0;
      bf    <= '0;
      done  <= 1'b0;
      smax  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          state <= RD;
          stage <= '0;
          bf    <= '0;
          smax  <= '0;
        end
        RD: state <= WR;
        WR: begin
          if (32'(stage) == LOGN - 1) smax <= max_scale(smax, max_scale(n0_s, n1_s));
          if (bf == LOGN'(N/2 - 1)) begin
            bf <= '0;
            if (32'(stage) == LOGN - 1) begin
              state <= IDLE;
              done  <= 1'b1;
            end else begin
              stage <= stage + 1'b1;
              state <= RD;
            end
          end else begin
            bf    <= bf + 1'b1;
            state <= RD;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  // Memory: port A and port B. In RD both ports read, in WR both write;
  // while idle port A takes loads and both ports serve the output reads.
  logic [LOGN-1:0]     oa, ob;
  logic signed [W-1:0] qa_re, qa_im, qb_re, qb_im;
  logic [7:0]          sha, shb;

  assign oa = LOGN'(bitrev(32'(rd_addr_a), LOGN));
  assign ob = LOGN'(bitrev(32'(rd_addr_b), LOGN));

  always_ff @(posedge clk) begin
    if (state == RD) begin
      a_re <= mem_re[i0]; a_im <= mem_im[i0]; a_s <= mem_s[i0];
      b_re <= mem_re[i1]; b_im <= mem_im[i1]; b_s <= mem_s[i1];
      c_r  <= tw_cos[twk[LOGN-2:0]];
      s_r  <= tw_sin[twk[LOGN-2:0]];
      i0_r <= i0;
      i1_r <= i1;
    end else if (state == WR) begin
      mem_re[i0_r] <= n0_re; mem_im[i0_r] <= n0_im; mem_s[i0_r] <= n0_s;
      mem_re[i1_r] <= n1_re; mem_im[i1_r] <= n1_im; mem_s[i1_r] <= n1_s;
    end else begin
      if (in_we) begin
        mem_re[in_addr] <= in_re;
        mem_im[in_addr] <= in_im;
        mem_s[in_addr]  <= '0;
      end
      qa_re <= mem_re[oa]; qa_im <= mem_im[oa]; sha <= smax - mem_s[oa];
      qb_re <= mem_re[ob]; qb_im <= mem_im[ob]; shb <= smax - mem_s[ob];
    end
  end

  assign rd_re_a = W'(sra_round(48'(qa_re), sha));
  assign rd_im_a = W'(sra_round(48'(qa_im), sha));
  assign rd_re_b = W'(sra_round(48'(qb_re), shb));
  assign rd_im_b = W'(sra_round(48'(qb_im), shb));

  // A new transform must not be started while one is running.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
