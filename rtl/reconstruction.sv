// reconstruction: per-angle Stolt migration of one plane-wave frame.
//
// Turns the raw RF frame P(t, x) of one emission angle into the phase-rotated
// (k_z, x) half-spectrum K, kept in an internal local data matrix of
// NT_FFT/2 rows by NX_FFT columns (Q1.14 real and imaginary parts). The steps
// follow the document's reconstruction flow, each one a streaming pass over
// the matrix:
//
//   T   temporal FFTs: columns 2p and 2p+1 of P are loaded as the real and
//       imaginary parts of one NT_FFT-point complex FFT; the two real spectra
//       are then separated with X[k] = (Z[k] + Z*[N-k])/2 and
//       Y[k] = (Z[k] - Z*[N-k])/(2j) (halving by an arithmetic shift) and
//       the positive-frequency half written to the matrix. Each column gets
//       the FFT's scaling factor S(x).                      (NX/2 passes)
//   X   spatial FFTs: each f row is equalised to max S(x) (columns x >= NX
//       are zero padding), transformed by the NX_FFT-point FFT and written
//       back in natural k_x order with factor S(f).          (NT_FFT/2 passes)
//   R   remap/multiply: for each k_x column the f-axis data, equalised to
//       max S(f), is copied to a column buffer; each k_z output is the
//       linear interpolation of the buffer at position M (unsigned Q12.12,
//       bins counted from 0) times the scaler A. M and A are read from
//       column g = m for m <= NX_FFT/2 and g = NX_FFT - m above, since both
//       depend only on k_x^2.                                 (NX_FFT passes)
//   Y   spatial IFFTs on each k_z row (conjugate in, conjugate out, no 1/N),
//       keeping the first NX columns, with factor S(k_z).     (NT_FFT/2 passes)
//   C   CORDIC phase rotation: each x column is equalised to max S(k_z) and
//       row k_z is rotated by phase k_z * R[x] (units of pi), the phase
//       being accumulated and wrapped into [-2, 2) row by row; row 0 is
//       passed through unrotated.                              (NX passes)
//
// The frame's scaling factor s_k = max S(x) + max S(f) + max S(k_z) is
// available with 'done'. Afterwards the matrix can be read through the
// k_row/k_col port (one cycle latency) while the block is idle.
//
// External memories (all synchronous, one cycle read latency):
//   P: two read ports, word x*NT_FFT + t, signed Q1.14 (zero padded by the
//      host for t >= Nt).
//   M and A: one shared address, word g*(NT_FFT/2) + k_z.
//   R: word x, signed Q3.12 in units of pi.
//
// Follows the document: the order of the steps, the pairing of real columns,
// the spectrum separation, the equalisation points, the use of one spatial
// FFT for both directions, the M/A/R formats and the skipped k_z = 0 row.
// This design's choices: radix-2 FFT engines (see fft_bfp), the bin-0 origin
// of M, the get_index mirroring, phase accumulation along k_z, and all
// handshakes (start pulse, done pulse).
module reconstruction
  import stolt_pkg::*;
#(
  parameter int unsigned NT_FFT = 4096,
  parameter int unsigned NX_FFT = 256,
  parameter int unsigned NX     = 128,
  parameter int unsigned NITER  = 14
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic busy,
  output logic done,
  output scale_t s_k,
  output logic [3:0] stage_o,        // current step, for observation
  // P memory
  output logic                              p_en,
  output logic [$clog2(NT_FFT*NX)-1:0]      p_addr_a,
  output logic [$clog2(NT_FFT*NX)-1:0]      p_addr_b,
  input  logic signed [15:0]                p_q_a,
  input  logic signed [15:0]                p_q_b,
  // M and A memories
  output logic                              ma_en,
  output logic [$clog2(NT_FFT/2*(NX_FFT/2+1))-1:0] ma_addr,
  input  logic [23:0]                       m_q,
  input  logic signed [15:0]                a_q,
  // R memory
  output logic                              r_en,
  output logic [$clog2(NX)-1:0]             r_addr,
  input  logic signed [15:0]                r_q,
  // K read port (idle only)
  input  logic [$clog2(NT_FFT/2)-1:0]       k_row,
  input  logic [$clog2(NX_FFT)-1:0]         k_col,
  output logic signed [15:0]                k_re,
  output logic signed [15:0]                k_im
);
  localparam int unsigned NTH  = NT_FFT / 2;
  localparam int unsigned LT   = $clog2(NT_FFT);
  localparam int unsigned LTH  = LT - 1;
  localparam int unsigned LX   = $clog2(NX_FFT);
  localparam int unsigned LNX  = $clog2(NX);
  localparam int unsigned LAT_C = NITER + 2;      // CORDIC latency
  localparam int unsigned DMAX  = LAT_C + 1;
  localparam int unsigned CW    = LT + 2;         // stream counter width
  localparam int unsigned MAW   = $clog2(NTH*(NX_FFT/2+1));

  typedef enum logic [3:0] {
    S_IDLE, S_T_LOAD, S_T_RUN, S_T_SPLIT, S_X_LOAD, S_X_RUN, S_X_STORE,
    S_R_COPY, S_R_COMP, S_Y_LOAD, S_Y_RUN, S_Y_STORE, S_C_RPH, S_C_RPH2,
    S_C_ROT, S_FIN
  } state_t;
  state_t state;
  assign stage_o = state;
  assign busy    = (state != S_IDLE);

  // ---------------- local data matrix ----------------
  logic signed [15:0] lm_re [NTH*NX_FFT];
  logic signed [15:0] lm_im [NTH*NX_FFT];
  logic [LTH+LX-1:0]  lm_raddr, lm_waddr;
  logic               lm_we;
  logic signed [15:0] lm_wre, lm_wim, lm_qre, lm_qim;

  always_ff @(posedge clk) begin
    if (lm_we) begin
      lm_re[lm_waddr] <= lm_wre;
      lm_im[lm_waddr] <= lm_wim;
    end
    lm_qre <= lm_re[lm_raddr];
    lm_qim <= lm_im[lm_raddr];
  end
  assign k_re = lm_qre;
  assign k_im = lm_qim;

  // ---------------- scaling factors ----------------
  scale_t sx [NX];
  scale_t sf [NTH];
  scale_t skz [NTH];
  scale_t max_sx, max_sf, max_skz;

  // ---------------- FFT engines ----------------
  logic                 ft_we, ft_start, ft_busy, ft_done;
  logic [LT-1:0]        ft_waddr, ft_ra, ft_rb;
  logic signed [15:0]   ft_wre, ft_wim, ft_qra, ft_qia, ft_qrb, ft_qib;
  scale_t               ft_smax;
  fft_bfp #(.N(NT_FFT), .W(16), .FRAC(14)) u_fft_t (
    .clk, .rst_n, .in_we(ft_we), .in_addr(ft_waddr), .in_re(ft_wre), .in_im(ft_wim),
    .start(ft_start), .busy(ft_busy), .done(ft_done), .smax(ft_smax),
    .rd_addr_a(ft_ra), .rd_re_a(ft_qra), .rd_im_a(ft_qia),
    .rd_addr_b(ft_rb), .rd_re_b(ft_qrb), .rd_im_b(ft_qib));

  logic                 fx_we, fx_start, fx_busy, fx_done;
  logic [LX-1:0]        fx_waddr, fx_ra;
  logic signed [15:0]   fx_wre, fx_wim, fx_qra, fx_qia, fx_qrb_u, fx_qib_u;
  scale_t               fx_smax;
  fft_bfp #(.N(NX_FFT), .W(16), .FRAC(14)) u_fft_x (
    .clk, .rst_n, .in_we(fx_we), .in_addr(fx_waddr), .in_re(fx_wre), .in_im(fx_wim),
    .start(fx_start), .busy(fx_busy), .done(fx_done), .smax(fx_smax),
    .rd_addr_a(fx_ra), .rd_re_a(fx_qra), .rd_im_a(fx_qia),
    .rd_addr_b('0), .rd_re_b(fx_qrb_u), .rd_im_b(fx_qib_u));

  // ---------------- column buffer for remapping ----------------
  logic signed [15:0] cb_re [NTH];
  logic signed [15:0] cb_im [NTH];
  logic signed [15:0] cb0_re, cb0_im, cb1_re, cb1_im;
  logic [LTH:0]       cb_a0, cb_a1;       // one extra bit for out-of-range
  logic               oob0, oob1;

  // ---------------- remap datapath ----------------
  logic               rm_valid_u;
  logic [11:0]        rm_frac;
  logic signed [15:0] rm_a, rm_re, rm_im;
  remap_multiply #(.W(16), .FR(14), .MF(12)) u_remap (
    .clk, .rst_n, .in_valid(1'b1),
    .v0_re(oob0 ? 16'sd0 : cb0_re), .v0_im(oob0 ? 16'sd0 : cb0_im),
    .v1_re(oob1 ? 16'sd0 : cb1_re), .v1_im(oob1 ? 16'sd0 : cb1_im),
    .frac(rm_frac), .a(rm_a), .out_valid(rm_valid_u), .out_re(rm_re), .out_im(rm_im));

  // ---------------- CORDIC ----------------
  logic signed [15:0] cr_in_re, cr_in_im, cr_phase, cr_re, cr_im;
  logic               cr_valid_u;
  cordic_rotator #(.W(16), .NITER(NITER)) u_cordic (
    .clk, .rst_n, .in_valid(1'b1), .in_re(cr_in_re), .in_im(cr_in_im), .in_phase(cr_phase),
    .out_valid(cr_valid_u), .out_re(cr_re), .out_im(cr_im));

  // ---------------- stream sequencing ----------------
  logic [CW-1:0]        cnt;
  logic [LNX-1:0]       pair;        // temporal FFT pair / rotation column
  logic [LTH-1:0]       row;         // f or k_z row
  logic [LX-1:0]        col;         // k_x column in remapping
  logic [CW-1:0]        len, depth;
  logic                 iss;
  logic                 vld [DMAX];
  logic [CW-1:0]        idx [DMAX];
  logic signed [15:0]   org_re [DMAX];
  logic signed [15:0]   org_im [DMAX];
  logic signed [15:0]   rinc, ps;
  logic [LX-1:0]        gcol;

  always_comb begin
    unique case (state)
      S_T_LOAD:  begin len = CW'(NT_FFT);  depth = CW'(1); end
      S_T_SPLIT: begin len = CW'(NT_FFT);  depth = CW'(1); end  // 2 writes per bin
      S_X_LOAD:  begin len = CW'(NX_FFT);  depth = CW'(1); end
      S_X_STORE: begin len = CW'(NX_FFT);  depth = CW'(1); end
      S_R_COPY:  begin len = CW'(NTH);     depth = CW'(1); end
      S_R_COMP:  begin len = CW'(NTH);     depth = CW'(4); end
      S_Y_LOAD:  begin len = CW'(NX_FFT);  depth = CW'(1); end
      S_Y_STORE: begin len = CW'(NX);      depth = CW'(1); end
      S_C_ROT:   begin len = CW'(NTH);     depth = CW'(DMAX); end
      default:   begin len = '0;           depth = '0; end
    endcase
    iss  = (cnt < len);
    gcol = (32'(col) <= NX_FFT/2) ? col : LX'(NX_FFT - 32'(col));
  end

  wire last = (cnt == len + depth - 1'b1);

  // wrap-around phase accumulation in [-2, 2), units of pi (Q3.12)
  function automatic logic signed [15:0] wrap_add(input logic signed [15:0] a,
                                                  input logic signed [15:0] b);
    logic signed [16:0] s;
    s = 17'(a) + 17'(b);
    if (s >= 17'sd8192)       s = s - 17'sd16384;
    else if (s < -17'sd8192)  s = s + 17'sd16384;
    return 16'(s);
  endfunction

  // Combinational memory/engine addressing for the current stream element.
  always_comb begin
    logic [CW-1:0] c1;
    p_en = 1'b0; p_addr_a = '0; p_addr_b = '0;
    ma_en = 1'b0; ma_addr = '0;
    r_en = 1'b0; r_addr = pair;
    ft_ra = '0; ft_rb = '0; fx_ra = '0;
    lm_raddr = {k_row, k_col};
    c1 = cnt >> 1;
    unique case (state)
      S_T_LOAD: begin
        p_en     = iss;
        p_addr_a = ($clog2(NT_FFT*NX))'((2*32'(pair))   * NT_FFT + 32'(cnt));
        p_addr_b = ($clog2(NT_FFT*NX))'((2*32'(pair)+1) * NT_FFT + 32'(cnt));
      end
      S_T_SPLIT: begin
        ft_ra = LT'(c1);
        ft_rb = LT'(NT_FFT - 32'(c1));
      end
      S_X_LOAD:  lm_raddr = {row, LX'(cnt)};
      S_X_STORE: fx_ra = LX'(cnt);
      S_R_COPY:  lm_raddr = {LTH'(cnt), col};
      S_R_COMP: begin
        ma_en   = iss;
        ma_addr = MAW'(32'(gcol) * NTH + 32'(cnt));
      end
      S_Y_LOAD:  lm_raddr = {row, LX'(cnt)};
      S_Y_STORE: fx_ra = LX'(cnt);
      S_C_RPH:   r_en = 1'b1;
      S_C_ROT:   lm_raddr = {LTH'(cnt), LX'(pair)};
      default: ;
    endcase
  end

  // Second-stage (delay 1) datapath feeding the engines.
  always_comb begin
    ft_we = 1'b0; ft_waddr = LT'(idx[0]); ft_wre = p_q_a; ft_wim = p_q_b;
    fx_we = 1'b0; fx_waddr = LX'(idx[0]); fx_wre = '0; fx_wim = '0;
    cr_in_re = 16'(sra_round(48'(lm_qre), max_skz - skz[LTH'(idx[0])]));
    cr_in_im = 16'(sra_round(48'(lm_qim), max_skz - skz[LTH'(idx[0])]));
    if (state == S_T_LOAD) ft_we = vld[0];
    if (state == S_X_LOAD) begin
      fx_we = vld[0];
      if (32'(idx[0]) < NX) begin
        fx_wre = 16'(sra_round(48'(lm_qre), max_sx - sx[LNX'(idx[0])]));
        fx_wim = 16'(sra_round(48'(lm_qim), max_sx - sx[LNX'(idx[0])]));
      end
    end
    if (state == S_Y_LOAD) begin
      fx_we  = vld[0];
      fx_wre = lm_qre;
      fx_wim = -lm_qim;
    end
  end

  // Colbuf reads driven from the M word that arrives at delay 1.
  assign cb_a0 = (LTH+1)'(m_q[23:12]);
  assign cb_a1 = (LTH+1)'(m_q[23:12]) + 1'b1;

  always_ff @(posedge clk) begin
    cb0_re <= cb_re[cb_a0[LTH-1:0]]; cb0_im <= cb_im[cb_a0[LTH-1:0]];
    cb1_re <= cb_re[cb_a1[LTH-1:0]]; cb1_im <= cb_im[cb_a1[LTH-1:0]];
    oob0   <= (32'(m_q[23:12]) >= NTH);
    oob1   <= (32'(m_q[23:12]) + 1 >= NTH);
    rm_frac <= m_q[11:0];
    rm_a    <= a_q;
  end

  // Phase fed to the CORDIC alongside the matrix sample (delay 1).
  logic signed [15:0] ph_d;
  assign cr_phase = ph_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DMAX); i++) vld[i] <= 1'b0;
    end else begin
      vld[0] <= iss && (state != S_IDLE);
      for (int i = 1; i < int'(DMAX); i++) vld[i] <= vld[i-1];
      // a pass ends once its last element has left its pipeline; entries
      // further down must not leak into the next, possibly deeper, pass
      if (last) for (int i = 0; i < int'(DMAX); i++) vld[i] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    idx[0] <= cnt;
    for (int i = 1; i < int'(DMAX); i++) idx[i] <= idx[i-1];
    org_re[0] <= '0; org_im[0] <= '0;
    org_re[1] <= cr_in_re; org_im[1] <= cr_in_im;
    for (int i = 2; i < int'(DMAX); i++) begin
      org_re[i] <= org_re[i-1]; org_im[i] <= org_im[i-1];
    end
  end

  // Main sequencer and write-back.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      pair     <= '0;
      row      <= '0;
      col      <= '0;
      done     <= 1'b0;
      ft_start <= 1'b0;
      fx_start <= 1'b0;
      lm_we    <= 1'b0;
      s_k      <= '0;
      max_sx   <= '0;
      max_sf   <= '0;
      max_skz  <= '0;
      rinc     <= '0;
      ps       <= '0;
      ph_d     <= '0;
    end else begin
      done     <= 1'b0;
      ft_start <= 1'b0;
      fx_start <= 1'b0;
      lm_we    <= 1'b0;
      if (state inside {S_T_LOAD, S_T_SPLIT, S_X_LOAD, S_X_STORE, S_R_COPY,
                        S_R_COMP, S_Y_LOAD, S_Y_STORE, S_C_ROT})
        cnt <= last ? '0 : cnt + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_T_LOAD;
          cnt     <= '0;
          pair    <= '0;
          max_sx  <= '0;
          max_sf  <= '0;
          max_skz <= '0;
        end
        S_T_LOAD: if (last) begin
          state    <= S_T_RUN;
          ft_start <= 1'b1;
        end
        S_T_RUN: if (ft_done) state <= S_T_SPLIT;
        S_T_SPLIT: begin
          if (vld[0]) begin
            logic [LTH-1:0] k;
            k = LTH'(idx[0] >> 1);
            lm_we    <= 1'b1;
            lm_waddr <= {k, LX'({pair, idx[0][0]})};
            if (!idx[0][0]) begin   // X = (Z[k] + conj Z[N-k]) / 2
              lm_wre <= 16'((17'(ft_qra) + 17'(ft_qrb)) >>> 1);
              lm_wim <= 16'((17'(ft_qia) - 17'(ft_qib)) >>> 1);
            end else begin          // Y = (Z[k] - conj Z[N-k]) / (2j)
              lm_wre <= 16'((17'(ft_qib) + 17'(ft_qia)) >>> 1);
              lm_wim <= 16'((17'(ft_qrb) - 17'(ft_qra)) >>> 1);
            end
          end
          if (last) begin
            sx[LNX'({pair, 1'b0})] <= ft_smax;
            sx[LNX'({pair, 1'b1})] <= ft_smax;
            max_sx <= max_scale(max_sx, ft_smax);
            if (32'(pair) == NX/2 - 1) begin
              state <= S_X_LOAD;
              row   <= '0;
            end else begin
              state <= S_T_LOAD;
              pair  <= pair + 1'b1;
            end
          end
        end
        S_X_LOAD: if (last) begin
          state    <= S_X_RUN;
          fx_start <= 1'b1;
        end
        S_X_RUN: if (fx_done) state <= S_X_STORE;
        S_X_STORE: begin
          if (vld[0]) begin
            lm_we    <= 1'b1;
            lm_waddr <= {row, LX'(idx[0])};
            lm_wre   <= fx_qra;
            lm_wim   <= fx_qia;
          end
          if (last) begin
            sf[row] <= fx_smax;
            max_sf  <= max_scale(max_sf, fx_smax);
            if (32'(row) == NTH - 1) begin
              state <= S_R_COPY;
              col   <= '0;
            end else begin
              state <= S_X_LOAD;
              row   <= row + 1'b1;
            end
          end
        end
        S_R_COPY: begin
          if (vld[0]) begin
            cb_re[LTH'(idx[0])] <= 16'(sra_round(48'(lm_qre), max_sf - sf[LTH'(idx[0])]));
            cb_im[LTH'(idx[0])] <= 16'(sra_round(48'(lm_qim), max_sf - sf[LTH'(idx[0])]));
          end
          if (last) state <= S_R_COMP;
        end
        S_R_COMP: begin
          if (vld[3]) begin
            lm_we    <= 1'b1;
            lm_waddr <= {LTH'(idx[3]), col};
            lm_wre   <= rm_re;
            lm_wim   <= rm_im;
          end
          if (last) begin
            if (32'(col) == NX_FFT - 1) begin
              state <= S_Y_LOAD;
              row   <= '0;
            end else begin
              state <= S_R_COPY;
              col   <= col + 1'b1;
            end
          end
        end
        S_Y_LOAD: if (last) begin
          state    <= S_Y_RUN;
          fx_start <= 1'b1;
        end
        S_Y_RUN: if (fx_done) state <= S_Y_STORE;
        S_Y_STORE: begin
          if (vld[0]) begin
            lm_we    <= 1'b1;
            lm_waddr <= {row, LX'(idx[0])};
            lm_wre   <= fx_qra;
            lm_wim   <= -fx_qia;
          end
          if (last) begin
            skz[row] <= fx_smax;
            max_skz  <= max_scale(max_skz, fx_smax);
            if (32'(row) == NTH - 1) begin
              state <= S_C_RPH;
              pair  <= '0;
            end else begin
              state <= S_Y_LOAD;
              row   <= row + 1'b1;
            end
          end
        end
        S_C_RPH:  state <= S_C_RPH2;
        S_C_RPH2: begin
          rinc  <= r_q;
          ps    <= '0;
          state <= S_C_ROT;
        end
        S_C_ROT: begin
          if (iss) begin
            ph_d <= ps;
            ps   <= wrap_add(ps, rinc);
          end
          if (vld[DMAX-1]) begin
            lm_we    <= 1'b1;
            lm_waddr <= {LTH'(idx[DMAX-1]), LX'(pair)};
            if (idx[DMAX-1] == '0) begin
              lm_wre <= org_re[DMAX-1];
              lm_wim <= org_im[DMAX-1];
            end else begin
              lm_wre <= cr_re;
              lm_wim <= cr_im;
            end
          end
          if (last) begin
            if (32'(pair) == NX - 1) state <= S_FIN;
            else begin
              state <= S_C_RPH;
              pair  <= pair + 1'b1;
            end
          end
        end
        S_FIN: begin
          s_k   <= max_sx + max_sf + max_skz;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE);
endmodule
