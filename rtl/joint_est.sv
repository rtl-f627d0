// joint_est: joint integer CFO, remainder CFO and sampling clock offset
// estimator working on the FFT output of a 2k-mode DVB-T receiver.
//
// Integer CFO (ICFO) uses the memory-less search: only the sign bits of the
// previous symbol are kept, so the correlation of the current symbol z_l with
// the previous one needs no multiplier,
//     phi = argmax_n | sum_{k in 12 pilots} z_l(k+n) * conj(sign(z_{l-1}(k+n))) |,
// for n in -R..R (R = 50). The 12 pilots are continual pilots more than 100
// carriers apart, so the search windows never overlap and every incoming
// sample updates at most one candidate: the FFT output is used in order, once.
// Sign bits are gathered 12 at a time in a serial-in register and written as
// one word (12 real signs + 12 imaginary signs) into the shared 171 x 24
// memory; the previous symbol's word at the same address is fetched one word
// ahead, so the memory sees one read and one write per 12 samples. Candidate
// sums live in the 101 x 26 correlation memory (13-bit real and imaginary).
// When the last window closes, the 101 sums are read out through the shared
// CORDIC (Abs) and an argmax picks the ICFO. A vote accepts an estimate when
// it equals one of the two before it (2 out of 3).
//
// States, changed only at a symbol start (state diagram of the estimator):
//   SIGN_WR  store the sign bits of one symbol
//   ICFO     store sign bits and correlate with the stored symbol, vote
//   PIL_WR   store the full 12-bit values of the 45 continual pilots
//   TRACK    correlate each continual pilot with its stored value (4 real
//            multipliers), sum separately over carriers below (C1) and above
//            (C2) the centre, and take both phases with the shared CORDIC
//            (Arctan):  rcfo_ang = (phi1+phi2)/2 and sco_ang = phi2-phi1.
// In PIL_WR/TRACK the pilots are expected at their nominal positions, i.e.
// the integer CFO is assumed removed upstream once icfo_lock is high.
// Converting to physical units: CFO in carrier spacings is
// rcfo_ang/2^16 * N/(N+Ng); the SCO follows from sco_ang divided by 2*pi,
// (1+Ng/N) and the mean carrier distance between C1 and C2.
//
// Interface: in_valid qualifies in_re/in_im; in_sym_start marks position 0
// of a symbol; positions follow the centred order of dvbt_pkg (carrier k at
// k+172). Between position 1542 (end of the last ICFO window) and position 4
// of the next symbol at least 2R+ITER+4 clocks must pass for the read-out.
// Follows the document: the 12-pilot set, sign-only storage, the two memory
// sizes (171 x 24, 101 x 26), one shared 11-iteration CORDIC, the 2-of-3
// vote, the four states and the C1/C2 split. The document's formula puts the
// sign on the current symbol while its text stores the sign of the previous
// one; the text is followed, as only that avoids keeping a full symbol.
// Widths of the sign-corrected terms (>>>4 so twelve fit in 13 bits), the
// pilot-product scaling and the port timing are choices of this design.
module joint_est #(
  parameter int N      = dvbt_pkg::N_FFT,   // FFT length
  parameter int SW     = 12,                // sample / memory word length
  parameter int R      = 50,                // ICFO search range +-R
  parameter int ACC_W  = 13,                // correlation memory half-word
  parameter int CITER  = 11,                // CORDIC iterations
  localparam int WORDS = (N + SW - 1) / SW, // 171 words
  localparam int NC    = 2 * R + 1          // 101 candidates
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   restart,
  input  logic                   in_valid,
  input  logic                   in_sym_start,
  input  logic signed [SW-1:0]   in_re,
  input  logic signed [SW-1:0]   in_im,
  output dvbt_pkg::je_state_e    state,
  output logic                   icfo_raw_valid,  // one estimate per ICFO symbol
  output logic signed [7:0]      icfo_raw,
  output logic                   icfo_lock,       // vote passed
  output logic signed [7:0]      icfo,
  output logic                   track_valid,     // one per TRACK symbol
  output logic signed [15:0]     phi1,
  output logic signed [15:0]     phi2,
  output logic signed [15:0]     rcfo_ang,
  output logic signed [15:0]     sco_ang
);
  import dvbt_pkg::*;

  localparam int PAW  = $clog2(N);
  localparam int WAW  = $clog2(WORDS);
  localparam int CAW  = $clog2(NC);
  localparam int PSH  = 8;        // pilot product scaling
  localparam int PACC = 22;       // pilot correlation accumulators
  localparam int CW   = 16;       // CORDIC input width

  // index of the first continual pilot above the centre (start of C2)
  function automatic int first_c2();
    for (int i = 0; i < N_CPIL; i++) if (CPIL_POS[i] >= K_CENTER) return i;
    return N_CPIL;
  endfunction
  localparam int CJ_C2 = first_c2();

  // ------------------------------------------------------------ position
  logic [PAW-1:0] pcnt, p;
  logic [3:0]     bcnt, b;        // bit inside the memory word
  logic [WAW-1:0] wcnt, w;        // memory word
  always_comb begin
    p = in_sym_start ? '0 : pcnt;
    b = in_sym_start ? '0 : bcnt;
    w = in_sym_start ? '0 : wcnt;
  end
  wire last_bit = (32'(b) == SW - 1) || (32'(p) == N - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pcnt <= '0; bcnt <= '0; wcnt <= '0;
    end else if (in_valid) begin
      pcnt <= p + 1'b1;
      bcnt <= last_bit ? '0 : b + 1'b1;
      wcnt <= last_bit ? w + 1'b1 : w;
    end
  end

  // ------------------------------------------------------------ state
  je_state_e st, st_now;
  logic      icfo_done;
  always_comb begin
    st_now = st;
    if (in_valid && in_sym_start) begin
      unique case (st)
        JE_IDLE:    st_now = JE_SIGN_WR;
        JE_SIGN_WR: st_now = JE_ICFO;
        JE_ICFO:    st_now = icfo_done ? JE_PIL_WR : JE_ICFO;
        JE_PIL_WR:  st_now = JE_TRACK;
        default:    st_now = JE_TRACK;
      endcase
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       st <= JE_IDLE;
    else if (restart) st <= JE_IDLE;
    else              st <= st_now;
  end
  assign state = st;

  // ------------------------------------------------------------ shared memory
  logic                 m_we, m_re;
  logic [WAW-1:0]       m_waddr, m_raddr;
  logic [2*SW-1:0]      m_wdata, m_rdata;
  sdp_ram #(.DEPTH(WORDS), .WIDTH(2*SW)) u_shared_mem (
    .clk, .we(m_we), .waddr(m_waddr), .wdata(m_wdata),
    .re(m_re), .raddr(m_raddr), .rdata(m_rdata));

  // sign bits of the current symbol, serial in, parallel out
  logic [SW-1:0] sr_re, sr_im, sr_re_n, sr_im_n;
  always_comb begin
    sr_re_n = sr_re;
    sr_im_n = sr_im;
    sr_re_n[b] = in_re[SW-1];
    sr_im_n[b] = in_im[SW-1];
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_re <= '0; sr_im <= '0;
    end else if (in_valid) begin
      sr_re <= last_bit ? '0 : sr_re_n;
      sr_im <= last_bit ? '0 : sr_im_n;
    end
  end

  wire sign_mode  = (st_now == JE_SIGN_WR) || (st_now == JE_ICFO);
  wire pilot_mode = (st_now == JE_PIL_WR)  || (st_now == JE_TRACK);

  // continual pilot pointer
  logic [5:0] cj;
  wire  [PAW-1:0] cpos = PAW'(CPIL_POS[cj] + K_OFFSET);
  wire  at_pilot = in_valid && pilot_mode && (p == cpos) && (32'(cj) < N_CPIL);
  wire  last_pil = (32'(cj) == N_CPIL - 1);

  always_comb begin
    m_we = 1'b0; m_re = 1'b0;
    m_waddr = '0; m_raddr = '0; m_wdata = '0;
    if (in_valid && sign_mode && last_bit) begin
      m_we    = 1'b1;
      m_waddr = w;
      m_wdata = {sr_re_n, sr_im_n};
      m_re    = 1'b1;                               // fetch next word ahead
      m_raddr = (32'(p) == N - 1) ? '0 : w + 1'b1;
    end else if (at_pilot) begin
      m_we    = 1'b1;
      m_waddr = WAW'(cj);
      m_wdata = {in_re, in_im};
      m_re    = 1'b1;                               // fetch next pilot ahead
      m_raddr = last_pil ? '0 : WAW'(cj + 1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  cj <= '0;
    else if (in_valid && in_sym_start && !at_pilot) cj <= '0;
    else if (at_pilot)                           cj <= last_pil ? '0 : cj + 1'b1;
  end

  // ------------------------------------------------------------ ICFO correlation
  logic [3:0] ip;
  wire  [PAW:0] ictr = (PAW+1)'(IPIL_POS[ip] + K_OFFSET);
  wire  [PAW:0] pe   = (PAW+1)'(p);
  wire  in_win  = in_valid && (st_now == JE_ICFO) && (32'(ip) < N_IPIL) &&
                  (pe + (PAW+1)'(R) >= ictr) && (pe <= ictr + (PAW+1)'(R));
  wire  win_end = in_win && (pe == ictr + (PAW+1)'(R));

  // previous symbol's sign bits for this position
  wire ps_re = m_rdata[SW + 32'(b)];
  wire ps_im = m_rdata[32'(b)];
  logic signed [SW:0] t_re, t_im;
  always_comb begin
    t_re = (ps_re ? -(SW+1)'(in_re) : (SW+1)'(in_re)) + (ps_im ? -(SW+1)'(in_im) : (SW+1)'(in_im));
    t_im = (ps_re ? -(SW+1)'(in_im) : (SW+1)'(in_im)) + (ps_im ? (SW+1)'(in_re) : -(SW+1)'(in_re));
  end

  logic                 c_we, c_re;
  logic [CAW-1:0]       c_waddr, c_raddr;
  logic [2*ACC_W-1:0]   c_wdata, c_rdata;
  sdp_ram #(.DEPTH(NC), .WIDTH(2*ACC_W)) u_corr_mem (
    .clk, .we(c_we), .waddr(c_waddr), .wdata(c_wdata),
    .re(c_re), .raddr(c_raddr), .rdata(c_rdata));

  // read-modify-write pipeline register
  logic                     a_v, a_first;
  logic [CAW-1:0]           a_addr;
  logic signed [ACC_W-1:0]  a_re, a_im;
  // read-out
  logic                     ro_act, ro_v;
  logic [CAW-1:0]           ro_cnt, ro_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ip <= '0; a_v <= 1'b0; a_first <= 1'b0; a_addr <= '0; a_re <= '0; a_im <= '0;
      ro_act <= 1'b0; ro_cnt <= '0; ro_v <= 1'b0; ro_addr <= '0;
    end else begin
      a_v <= in_win;
      if (in_win) begin
        a_addr  <= CAW'(pe + (PAW+1)'(R) - ictr);
        a_first <= (ip == 0);
        a_re    <= ACC_W'(t_re >>> 4);
        a_im    <= ACC_W'(t_im >>> 4);
      end
      if (in_valid && in_sym_start && !in_win) ip <= '0;
      else if (win_end) ip <= ip + 1'b1;
      // start the read-out once the last window has closed
      if (win_end && (32'(ip) == N_IPIL - 1)) begin
        ro_act <= 1'b1; ro_cnt <= '0;
      end else if (ro_act) begin
        ro_cnt <= ro_cnt + 1'b1;
        if (32'(ro_cnt) == NC - 1) ro_act <= 1'b0;
      end
      ro_v    <= ro_act;
      ro_addr <= ro_cnt;
    end
  end

  always_comb begin
    c_re = in_win || ro_act;
    c_raddr = ro_act ? ro_cnt : CAW'(pe + (PAW+1)'(R) - ictr);
    c_we = a_v;
    c_waddr = a_addr;
    c_wdata = a_first ? {a_re, a_im}
                      : {ACC_W'(c_rdata[2*ACC_W-1:ACC_W]) + a_re, ACC_W'(c_rdata[ACC_W-1:0]) + a_im};
  end

  // ------------------------------------------------------------ pilot correlation
  wire signed [SW-1:0] pv_re = m_rdata[2*SW-1:SW];
  wire signed [SW-1:0] pv_im = m_rdata[SW-1:0];
  logic signed [2*SW:0] pr_re, pr_im;
  always_comb begin
    pr_re = (2*SW+1)'(in_re) * (2*SW+1)'(pv_re) + (2*SW+1)'(in_im) * (2*SW+1)'(pv_im);
    pr_im = (2*SW+1)'(in_im) * (2*SW+1)'(pv_re) - (2*SW+1)'(in_re) * (2*SW+1)'(pv_im);
  end
  logic signed [PACC-1:0] c1_re, c1_im, c2_re, c2_im;
  logic [1:0] ang_req;        // 1: send C1, 2: send C2
  wire track_pil = at_pilot && (st_now == JE_TRACK);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1_re <= '0; c1_im <= '0; c2_re <= '0; c2_im <= '0; ang_req <= '0;
    end else begin
      if (track_pil) begin
        if (CPIL_POS[cj] < K_CENTER) begin
          c1_re <= ((cj == 0) ? '0 : c1_re) + PACC'(pr_re >>> PSH);
          c1_im <= ((cj == 0) ? '0 : c1_im) + PACC'(pr_im >>> PSH);
        end else begin
          c2_re <= ((32'(cj) == CJ_C2) ? '0 : c2_re) + PACC'(pr_re >>> PSH);
          c2_im <= ((32'(cj) == CJ_C2) ? '0 : c2_im) + PACC'(pr_im >>> PSH);
        end
      end
      if (track_pil && last_pil) ang_req <= 2'd1;
      else if (ang_req == 2'd1)  ang_req <= 2'd2;
      else                       ang_req <= 2'd0;
    end
  end

  // ------------------------------------------------------------ shared CORDIC
  logic              cv_in_v, cv_out_v;
  logic signed [CW-1:0] cv_x, cv_y;
  logic [7:0]        cv_tag, cv_otag;
  logic [CW+1:0]     cv_mag;
  logic signed [15:0] cv_ang;
  always_comb begin
    cv_in_v = 1'b0; cv_x = '0; cv_y = '0; cv_tag = '0;
    if (ro_v) begin
      cv_in_v = 1'b1;
      cv_x = CW'($signed(c_rdata[2*ACC_W-1:ACC_W]));
      cv_y = CW'($signed(c_rdata[ACC_W-1:0]));
      cv_tag = 8'(ro_addr);
    end else if (ang_req == 2'd1) begin
      cv_in_v = 1'b1; cv_x = CW'(c1_re >>> 6); cv_y = CW'(c1_im >>> 6); cv_tag = 8'h80;
    end else if (ang_req == 2'd2) begin
      cv_in_v = 1'b1; cv_x = CW'(c2_re >>> 6); cv_y = CW'(c2_im >>> 6); cv_tag = 8'h81;
    end
  end
  cordic_vec #(.IN_W(CW), .ITER(CITER), .TAG_W(8)) u_cordic (
    .clk, .rst_n, .in_valid(cv_in_v), .in_x(cv_x), .in_y(cv_y), .in_tag(cv_tag),
    .out_valid(cv_out_v), .out_mag(cv_mag), .out_ang(cv_ang), .out_tag(cv_otag));

  // ------------------------------------------------------------ argmax, vote, results
  logic [CW+1:0]      best_mag;
  logic [CAW-1:0]     best_idx;
  logic signed [7:0]  hist0, hist1;
  logic [1:0]         nhist;
  logic signed [15:0] phi1_r;
  wire                is_abs  = cv_out_v && !cv_otag[7];
  wire                better  = (cv_otag == 8'd0) || (cv_mag > best_mag);
  wire [CAW-1:0]      win_idx = better ? CAW'(cv_otag) : best_idx;
  wire signed [7:0]   est     = 8'(32'(win_idx) - R);
  wire signed [15:0]  dphi    = cv_ang - phi1_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_mag <= '0; best_idx <= '0; hist0 <= '0; hist1 <= '0; nhist <= '0;
      icfo_raw_valid <= 1'b0; icfo_raw <= '0; icfo_done <= 1'b0; icfo <= '0;
      track_valid <= 1'b0; phi1_r <= '0; phi2 <= '0; rcfo_ang <= '0; sco_ang <= '0;
    end else begin
      icfo_raw_valid <= 1'b0;
      track_valid    <= 1'b0;
      if (restart) begin
        icfo_done <= 1'b0; nhist <= '0;
      end else if (is_abs) begin
        best_mag <= better ? cv_mag : best_mag;
        best_idx <= win_idx;
        if (32'(cv_otag) == NC - 1) begin
          icfo_raw_valid <= 1'b1;
          icfo_raw       <= est;
          hist0 <= est;
          hist1 <= hist0;
          if (nhist != 2'd2) nhist <= nhist + 1'b1;
          if (!icfo_done && ((nhist >= 2'd1 && est == hist0) || (nhist == 2'd2 && est == hist1))) begin
            icfo_done <= 1'b1;
            icfo      <= est;
          end
        end
      end else if (cv_out_v && cv_otag == 8'h80) begin
        phi1_r <= cv_ang;
      end else if (cv_out_v && cv_otag == 8'h81) begin
        phi2        <= cv_ang;
        sco_ang     <= dphi;
        rcfo_ang    <= phi1_r + (dphi >>> 1);
        track_valid <= 1'b1;
      end
    end
  end
  assign phi1      = phi1_r;
  assign icfo_lock = icfo_done;

  // the read-out of the candidates must not meet the next window
  a_ro_gap: assert property (@(posedge clk) disable iff (!rst_n) !(ro_act && in_win))
    else $error("joint_est: ICFO read-out overlaps a correlation window");

endmodule
