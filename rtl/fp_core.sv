// fp_core: the fingerprint module of the phase-only-filter correlator.
//
// It correlates every probe image against every gallery sample. For a pair
// (probe f, gallery g) it computes the probe spectrum F = FFT2(f), the filter
// H_POF = conj(G)/|G| with G = FFT2(g), and the correlation plane
// C = FFT2(F * H_POF) (a forward FFT stands in for the inverse; this mirrors
// the plane but keeps its magnitude), and records the largest |C| per probe.
// Each two-dimensional FFT is a row pass followed by a column pass, giving
// four phases:
//   1a  row FFTs of probe (buffer gn) and gallery (buffer fn) -> mb0 (16 bit)
//   1b  column FFTs of both -> F and G; P = F*H_POF with an FFT shift (the
//       quadrants are swapped when P is written) -> mb1 (36 bit)
//   2a  row FFT of the 24 MSBs of mb1 -> mb2
//   2b  column FFT of the 24 MSBs of mb2, streamed into the peak detector.
// The design runs two alternating slots: slot A executes 1a of pair t with 2a
// of pair t-1, slot B executes 1b of pair t with 2b of pair t-1 and, since gn
// and fn are idle in slot B, loads the images of pair t+1 from the off-chip
// SRAM. Pairs are taken probe-fastest: all probes against gallery 0, then
// gallery 1, so a gallery image is fetched once and a probe once per gallery
// sample. A slot ends when every unit in it is done.
//
// Four FFT units: two for the first transform (probe, gallery), used by 1a and
// 1b; two 24-bit units for the second transform, one for 2a and one for 2b.
// The phases, buffers, widths, schedule and prefetch follow the source design;
// giving 2a and 2b one unit each, the probe-then-gallery load order and the
// per-probe result table are this design's own choices.
//
// Memory interface (to the arbiter): one read request per clock (rd_req,
// rd_kind, rd_img, rd_word; accepted when rd_gnt), data returning in order on
// rd_rvalid/rd_rdata. A gallery image is requested only when its bank is
// marked ready (bank_ready); when the first image of a new gallery bank is
// fetched the previous bank is released (gal_release), and the last bank is
// released at the end of the run, so the host can refill it.
//
// Host interface: n_probes, n_gallery and start; busy while running, done
// pulses at the end; the best match of probe p (squared peak magnitude,
// coordinates, gallery index) is read with res_addr one clock later.
module fp_core
  import fp_pkg::*;
#(
  parameter int N     = 128,
  parameter int PRB_W = 8,     // up to 256 probes
  parameter int GAL_W = 13,    // up to 8191 gallery samples
  parameter int BANK_IMGS = 256, // images per SRAM bank
  localparam int LN    = $clog2(N),
  localparam int AW    = 2 * LN,
  localparam int WORDS = N * N / PIX_PER_W,
  localparam int WA    = $clog2(WORDS),
  localparam int W1_OUT = W1_IN + LN,        // 23
  localparam int W2_OUT = W2_IN + LN         // 31
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host
  input  logic                  start,
  input  logic [PRB_W:0]        n_probes,
  input  logic [GAL_W:0]        n_gallery,
  output logic                  busy,
  output logic                  done,
  input  logic [PRB_W-1:0]      res_addr,
  output logic [2*W2_OUT-1:0]   res_amp,
  output logic [LN-1:0]         res_row,
  output logic [LN-1:0]         res_col,
  output logic [GAL_W-1:0]      res_gal,
  // off-chip memory through the arbiter
  output logic                  rd_req,
  output img_kind_e             rd_kind,
  output logic [GAL_W-1:0]      rd_img,
  output logic [WA-1:0]         rd_word,
  input  logic                  rd_gnt,
  input  logic                  rd_rvalid,
  input  logic [SRAM_W-1:0]     rd_rdata,
  input  logic [1:0]            bank_ready,
  output logic                  gal_release,
  output logic                  gal_release_bank
);

  localparam int TW = PRB_W + GAL_W + 2;   // pair counter width

  // ---------------------------------------------------------------- buffers
  logic [AW-1:0] p1p_src, p1g_src, p2a_src, p2b_src;
  logic [SRAM_W-1:0] gn_rd, fn_rd;
  logic [2:0] p1p_sel_d, p1g_sel_d;
  logic ld_we_gn, ld_we_fn;
  logic [WA-1:0] ld_waddr;

  // image buffers: eight pixels per word
  fp_buffer #(.DEPTH(WORDS), .W(SRAM_W)) u_gn (
    .clk, .we(ld_we_gn), .waddr(ld_waddr), .wdata(rd_rdata),
    .raddr(p1p_src[AW-1:3]), .rdata(gn_rd));
  fp_buffer #(.DEPTH(WORDS), .W(SRAM_W)) u_fn (
    .clk, .we(ld_we_fn), .waddr(ld_waddr), .wdata(rd_rdata),
    .raddr(p1g_src[AW-1:3]), .rdata(fn_rd));

  // mb0: row spectra of probe and gallery
  logic ph1_col;                     // 0: phase 1a, 1: phase 1b
  logic p1p_ov, p1g_ov;
  logic signed [W1_OUT-1:0] p1p_re, p1p_im, p1g_re, p1g_im;
  logic [AW-1:0] p1p_oaddr, p1g_oaddr;
  logic [2*W1_IN-1:0] mb0p_rd, mb0g_rd;

  fp_buffer #(.DEPTH(N*N), .W(2*W1_IN)) u_mb0p (
    .clk, .we(p1p_ov && !ph1_col), .waddr(p1p_oaddr),
    .wdata({W1_IN'(p1p_re), W1_IN'(p1p_im)}),
    .raddr(p1p_src), .rdata(mb0p_rd));
  fp_buffer #(.DEPTH(N*N), .W(2*W1_IN)) u_mb0g (
    .clk, .we(p1g_ov && !ph1_col), .waddr(p1g_oaddr),
    .wdata({W1_IN'(p1g_re), W1_IN'(p1g_im)}),
    .raddr(p1g_src), .rdata(mb0g_rd));

  // pixel select for phase 1a, mb0 for phase 1b
  logic signed [W1_IN-1:0] p1p_in_re, p1p_in_im, p1g_in_re, p1g_in_im;
  always_ff @(posedge clk) begin
    p1p_sel_d <= p1p_src[2:0];
    p1g_sel_d <= p1g_src[2:0];
  end
  always_comb begin
    if (ph1_col) begin
      p1p_in_re = mb0p_rd[2*W1_IN-1:W1_IN];
      p1p_in_im = mb0p_rd[W1_IN-1:0];
      p1g_in_re = mb0g_rd[2*W1_IN-1:W1_IN];
      p1g_in_im = mb0g_rd[W1_IN-1:0];
    end else begin
      p1p_in_re = W1_IN'(gn_rd[p1p_sel_d*8 +: 8]);
      p1p_in_im = '0;
      p1g_in_re = W1_IN'(fn_rd[p1g_sel_d*8 +: 8]);
      p1g_in_im = '0;
    end
  end

  // ------------------------------------------------------ first transform
  logic p1_start, p1p_busy, p1g_busy;
  logic p1p_done, p1g_done;

  fp_pass #(.N(N), .IW(W1_IN)) u_p1p (
    .clk, .rst_n, .start(p1_start), .col_mode(ph1_col), .line0('0), .lstep(LN'(1)),
    .nlines((LN+1)'(N)), .busy(p1p_busy), .done(p1p_done), .src_addr(p1p_src),
    .src_re(p1p_in_re), .src_im(p1p_in_im),
    .o_valid(p1p_ov), .o_re(p1p_re), .o_im(p1p_im), .o_addr(p1p_oaddr));
  fp_pass #(.N(N), .IW(W1_IN)) u_p1g (
    .clk, .rst_n, .start(p1_start), .col_mode(ph1_col), .line0('0), .lstep(LN'(1)),
    .nlines((LN+1)'(N)), .busy(p1g_busy), .done(p1g_done), .src_addr(p1g_src),
    .src_re(p1g_in_re), .src_im(p1g_in_im),
    .o_valid(p1g_ov), .o_re(p1g_re), .o_im(p1g_im), .o_addr(p1g_oaddr));

  // phase 1b: POF product with FFT shift -> mb1
  localparam int POF_LAT = 18;
  logic pof_ov, pof_busy;
  logic signed [MB1_W-1:0] pof_re, pof_im;
  logic [AW-1:0] pof_addr_pipe [POF_LAT];
  logic [AW-1:0] shift_mask;
  assign shift_mask = AW'((1 << (AW - 1)) | (1 << (LN - 1)));

  fp_pof_mult #(.IW(W1_OUT), .OW(MB1_W), .ITER(16)) u_pof (
    .clk, .rst_n, .in_valid(p1p_ov && ph1_col),
    .f_re(p1p_re), .f_im(p1p_im), .g_re(p1g_re), .g_im(p1g_im),
    .busy(pof_busy), .out_valid(pof_ov), .p_re(pof_re), .p_im(pof_im));

  always_ff @(posedge clk) begin
    pof_addr_pipe[0] <= p1p_oaddr ^ shift_mask;
    for (int i = 1; i < POF_LAT; i++) pof_addr_pipe[i] <= pof_addr_pipe[i-1];
  end

  logic [2*MB1_W-1:0] mb1_rd;
  fp_buffer #(.DEPTH(N*N), .W(2*MB1_W)) u_mb1 (
    .clk, .we(pof_ov), .waddr(pof_addr_pipe[POF_LAT-1]), .wdata({pof_re, pof_im}),
    .raddr(p2a_src), .rdata(mb1_rd));

  // ----------------------------------------------------- second transform
  logic p2_start, p2a_busy, p2b_busy, p2a_done, p2b_done;
  logic p2a_ov, p2b_ov;
  logic signed [W2_OUT-1:0] p2a_re, p2a_im, p2b_re, p2b_im;
  logic [AW-1:0] p2a_oaddr, p2b_oaddr;
  logic [2*W2_OUT-1:0] mb2_rd;

  fp_pass #(.N(N), .IW(W2_IN)) u_p2a (
    .clk, .rst_n, .start(p2_start && ph1_col == 1'b0), .col_mode(1'b0), .line0('0),
    .lstep(LN'(1)), .nlines((LN+1)'(N)), .busy(p2a_busy), .done(p2a_done),
    .src_addr(p2a_src),
    .src_re(mb1_rd[2*MB1_W-1 -: W2_IN]), .src_im(mb1_rd[MB1_W-1 -: W2_IN]),
    .o_valid(p2a_ov), .o_re(p2a_re), .o_im(p2a_im), .o_addr(p2a_oaddr));

  fp_buffer #(.DEPTH(N*N), .W(2*W2_OUT)) u_mb2 (
    .clk, .we(p2a_ov), .waddr(p2a_oaddr), .wdata({p2a_re, p2a_im}),
    .raddr(p2b_src), .rdata(mb2_rd));

  fp_pass #(.N(N), .IW(W2_IN)) u_p2b (
    .clk, .rst_n, .start(p2_start && ph1_col == 1'b1), .col_mode(1'b1), .line0('0),
    .lstep(LN'(1)), .nlines((LN+1)'(N)), .busy(p2b_busy), .done(p2b_done),
    .src_addr(p2b_src),
    .src_re(mb2_rd[2*W2_OUT-1 -: W2_IN]), .src_im(mb2_rd[W2_OUT-1 -: W2_IN]),
    .o_valid(p2b_ov), .o_re(p2b_re), .o_im(p2b_im), .o_addr(p2b_oaddr));

  // ------------------------------------------------------------ peak search
  logic [PRB_W-1:0] pk_probe;
  logic [GAL_W-1:0] pk_gal;
  logic pk_start, pk_end;

  fp_peak #(.W(W2_OUT), .N(N), .GAL_W(GAL_W), .PRB_W(PRB_W)) u_peak (
    .clk, .rst_n, .frame_start(pk_start), .frame_end(pk_end),
    .probe_idx(pk_probe), .gal_idx(pk_gal),
    .in_valid(p2b_ov), .in_re(p2b_re), .in_im(p2b_im),
    .in_row(p2b_oaddr[AW-1:LN]), .in_col(p2b_oaddr[LN-1:0]),
    .peak_valid(), .peak_amp(), .peak_row(), .peak_col(),
    .res_addr, .res_amp, .res_row, .res_col, .res_gal);

  // ------------------------------------------------------------ image loads
  typedef enum logic [1:0] {L_IDLE, L_RUN} ld_state_e;
  ld_state_e ld_state;
  logic ld_start, ld_do_p, ld_do_g, ld_busy;
  logic [PRB_W-1:0] ld_probe;
  logic [GAL_W-1:0] ld_gal;
  logic [WA+1:0] ld_icnt, ld_rcnt, ld_total;
  logic ld_issue_gal, ld_resp_gal;
  logic ld_gal_bank;
  logic ld_job_p, ld_job_g;
  logic [PRB_W-1:0] ld_job_probe;
  logic [GAL_W-1:0] ld_job_gal;

  assign ld_busy      = (ld_state != L_IDLE);
  assign ld_total     = (WA+2)'(ld_do_p ? WORDS : 0) + (WA+2)'(ld_do_g ? WORDS : 0);
  assign ld_issue_gal = !ld_do_p || ld_icnt >= (WA+2)'(WORDS);
  assign ld_resp_gal  = !ld_do_p || ld_rcnt >= (WA+2)'(WORDS);
  assign ld_gal_bank  = ld_gal[$clog2(BANK_IMGS)];
  assign rd_req   = ld_state == L_RUN && ld_icnt < ld_total && (!ld_issue_gal || bank_ready[ld_gal_bank]);
  assign rd_kind  = ld_issue_gal ? K_GALLERY : K_PROBE;
  assign rd_img   = ld_issue_gal ? ld_gal : GAL_W'(ld_probe);
  assign rd_word  = ld_icnt[WA-1:0];
  assign ld_we_gn = rd_rvalid && !ld_resp_gal;
  assign ld_we_fn = rd_rvalid && ld_resp_gal;
  assign ld_waddr = ld_rcnt[WA-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_state <= L_IDLE;
      ld_icnt <= '0;
      ld_rcnt <= '0;
    end else begin
      unique case (ld_state)
        L_IDLE: if (ld_start && (ld_do_p || ld_do_g)) begin
          ld_state <= L_RUN;
          ld_icnt <= '0;
          ld_rcnt <= '0;
        end
        L_RUN: begin
          if (rd_req && rd_gnt) ld_icnt <= ld_icnt + 1'b1;
          if (rd_rvalid) begin
            ld_rcnt <= ld_rcnt + 1'b1;
            if (ld_rcnt + 1'b1 == ld_total) ld_state <= L_IDLE;
          end
        end
        default: ld_state <= L_IDLE;
      endcase
    end
  end

  // -------------------------------------------------------------- schedule
  typedef enum logic [2:0] {S_IDLE, S_PRELOAD, S_PRELOAD_WAIT, S_A_GO, S_A_WAIT,
                            S_B_GO, S_B_WAIT, S_FINISH} core_state_e;
  core_state_e state;
  logic [TW-1:0] slot, n_pairs;
  logic [PRB_W:0] cur_p, nxt_p, prv_p;       // probe of pair slot / slot+1 / slot-1
  logic [GAL_W:0] cur_g, nxt_g, prv_g;
  logic [PRB_W:0] np;
  logic [GAL_W:0] ng;
  logic has_cur, has_prv;

  assign busy    = (state != S_IDLE);
  assign has_cur = slot < n_pairs;
  assign has_prv = slot != '0;
  assign ph1_col = (state == S_B_GO || state == S_B_WAIT);

  always_comb begin
    p1_start = 1'b0;
    p2_start = 1'b0;
    ld_start = 1'b0;
    ld_do_p  = 1'b0;
    ld_do_g  = 1'b0;
    ld_probe = nxt_p[PRB_W-1:0];
    ld_gal   = nxt_g[GAL_W-1:0];
    pk_start = 1'b0;
    unique case (state)
      S_PRELOAD: begin
        ld_start = 1'b1;
        ld_do_p  = 1'b1;
        ld_do_g  = 1'b1;
        ld_probe = '0;
        ld_gal   = '0;
      end
      S_A_GO: begin
        p1_start = has_cur;
        p2_start = has_prv;
      end
      S_B_GO: begin
        p1_start = has_cur;
        p2_start = has_prv;
        pk_start = has_prv;
        ld_start = slot + 1'b1 < n_pairs;
        ld_do_p  = np != 1;
        ld_do_g  = nxt_p == '0;
      end
      S_B_WAIT, S_PRELOAD_WAIT, S_IDLE, S_A_WAIT, S_FINISH: ;
      default: ;
    endcase
    // keep ld_do_* stable during the load for the response routing
    if (ld_busy) begin
      ld_do_p = ld_job_p;
      ld_do_g = ld_job_g;
      ld_probe = ld_job_probe;
      ld_gal   = ld_job_gal;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_job_p <= 1'b0; ld_job_g <= 1'b0; ld_job_probe <= '0; ld_job_gal <= '0;
    end else if (!ld_busy && ld_start) begin
      ld_job_p <= ld_do_p; ld_job_g <= ld_do_g; ld_job_probe <= ld_probe; ld_job_gal <= ld_gal;
    end
  end

  // bank release: when the first image of a new gallery bank is loaded, and
  // at the end of the run
  logic rel_new_bank;
  assign rel_new_bank = ld_start && !ld_busy && ld_do_g &&
                        ld_gal[$clog2(BANK_IMGS)-1:0] == '0 && ld_gal != '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gal_release <= 1'b0;
      gal_release_bank <= 1'b0;
    end else begin
      gal_release <= 1'b0;
      if (rel_new_bank) begin
        gal_release <= 1'b1;
        gal_release_bank <= ~ld_gal[$clog2(BANK_IMGS)];
      end else if (state == S_FINISH) begin
        gal_release <= 1'b1;
        gal_release_bank <= prv_g[$clog2(BANK_IMGS)];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      slot <= '0; n_pairs <= '0; np <= '0; ng <= '0;
      cur_p <= '0; cur_g <= '0; nxt_p <= '0; nxt_g <= '0; prv_p <= '0; prv_g <= '0;
      pk_probe <= '0; pk_gal <= '0; pk_end <= 1'b0;
      done <= 1'b0;
    end else begin
      done   <= 1'b0;
      pk_end <= 1'b0;
      unique case (state)
        S_IDLE: if (start && n_probes != '0 && n_gallery != '0) begin
          state   <= S_PRELOAD;
          np      <= n_probes;
          ng      <= n_gallery;
          n_pairs <= TW'(n_probes) * TW'(n_gallery);
          slot    <= '0;
          cur_p <= '0; cur_g <= '0;
          nxt_p <= (n_probes == 1) ? '0 : (PRB_W+1)'(1);
          nxt_g <= (n_probes == 1) ? (GAL_W+1)'(1) : '0;
        end else if (start) done <= 1'b1;
        S_PRELOAD:      state <= S_PRELOAD_WAIT;
        S_PRELOAD_WAIT: if (!ld_busy) state <= S_A_GO;
        S_A_GO:         state <= S_A_WAIT;
        S_A_WAIT: if (!p1p_busy && !p1g_busy && !p2a_busy && !p1_start && !p2_start)
                    state <= S_B_GO;
        S_B_GO: begin
          state    <= S_B_WAIT;
          pk_probe <= prv_p[PRB_W-1:0];
          pk_gal   <= prv_g[GAL_W-1:0];
        end
        S_B_WAIT: if (!p1p_busy && !p1g_busy && !p2b_busy && !ld_busy && !pof_busy) begin
          pk_end <= has_prv;
          // advance one pair
          prv_p <= cur_p; prv_g <= cur_g;
          cur_p <= nxt_p; cur_g <= nxt_g;
          if (nxt_p + 1'b1 == np) begin
            nxt_p <= '0;
            nxt_g <= nxt_g + 1'b1;
          end else nxt_p <= nxt_p + 1'b1;
          slot <= slot + 1'b1;
          state <= (slot == n_pairs) ? S_FINISH : S_A_GO;
        end
        S_FINISH: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_p1_lockstep: assert property (@(posedge clk) disable iff (!rst_n) p1p_ov == p1g_ov);
  a_load_idle_in_a: assert property (@(posedge clk) disable iff (!rst_n)
                                     (state == S_A_WAIT) |-> !ld_busy);

endmodule
