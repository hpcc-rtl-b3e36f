// hpcc_cc -- HPCC sender congestion control (the CC module of the NIC).
//
// For every ACK of a local flow the module runs the HPCC sender algorithm:
//
//   MeasureInflight: for each hop i of the path,
//       txRate = (ack.txBytes - L.txBytes) / (ack.ts - L.ts)
//       u'     = min(ack.qlen, L.qlen) / (B*T) + txRate / B
//     keep the largest u' and its time gap tau, clip tau to T, and filter
//       U = (1 - tau/T) * U + (tau/T) * u.
//   ComputeWind: if U >= eta or incStage >= maxStage
//       W = Wc / (U/eta) + W_AI   (multiplicative step, incStage := 0)
//     else
//       W = Wc + W_AI             (additive step, incStage += 1)
//     Wc := W and the stage counter change only when the ACK acknowledges a
//     packet beyond lastUpdateSeq (once per round trip); lastUpdateSeq is then
//     set to the flow's snd_nxt. Every ACK yields a new W, computed from the
//     reference window Wc, so several ACKs in one round trip do not compound.
//   The pacing rate is R = W / T. The new (W, R) leave on the Update port and
//   the ACK's INT records become the flow's stored link records L.
//
// If the ACK's pathID or hop count differs from the stored records, or the
// flow has no records yet, the records are replaced and no window is
// computed. The division by U uses hpcc_recip_div (reciprocal table), the
// division by the hop time gap too; divisions by constants (B*T, B, T) are
// multiplications by elaboration-time reciprocals.
//
// Interface: ack_valid/ack_ready handshake for cc_ack_t events; init_valid
// resets a flow's state (accepted only while idle, ahead of ACKs); upd_valid
// is a one-cycle pulse with the Update event and must be taken. Timing: one
// ACK is accepted at a time and takes nHop + 3 clocks (accept, check, one per
// hop, EWMA, window); ack_ready is high only while idle. The per-flow state
// is an array read and written once per ACK.
//
// Published values: eta = 95 %, maxStage = 5, W_AI = 80 bytes, T = 9 us
// (testbed), W_init = B_NIC * T with a 25 Gbit/s NIC. Own choices: ts unit
// 1 ns, hops with equal timestamps are skipped, W is capped at W_init (the
// line rate) and the fixed-point formats of hpcc_pkg.
module hpcc_cc
  import hpcc_pkg::*;
#(
  parameter int unsigned NUM_FLOWS = 300,   // 6 engines x 50 flows
  parameter int unsigned T_NS      = 9000,  // base RTT T in ns
  parameter int unsigned CLK_NS    = 5,     // clock period in ns
  parameter int unsigned NIC_GBPS  = 25,    // B_NIC
  parameter int unsigned W_AI      = 80,    // additive increase, bytes
  parameter int unsigned MAX_STAGE = 5,
  parameter int unsigned ETA_PCT   = 95
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      init_valid,
  input  logic [FLOW_W-1:0] init_flow,
  output logic      init_ready,
  input  logic      ack_valid,
  input  cc_ack_t   ack,
  output logic      ack_ready,
  output logic      upd_valid,
  output cc_upd_t   upd,
  // one-cycle event pulses, for monitoring
  output logic      ev_md,        // multiplicative (Eqn 4) step taken
  output logic      ev_ai,        // additive step taken
  output logic      ev_wc_update, // reference window Wc synchronised
  output logic      ev_path_reset // link records replaced
);

  localparam int unsigned W_INIT = NIC_GBPS * T_NS / 8;
  localparam int unsigned ETA_Q  = (ETA_PCT * (1 << U_FRAC) + 50) / 100;
  localparam longint unsigned INV_T  = ((64'd1 << 32) + 64'(T_NS / 2)) / 64'(T_NS);
  localparam longint unsigned RATE_K = ((64'(CLK_NS) << 32) + 64'(T_NS / 2)) / 64'(T_NS);
  localparam int unsigned FI_W = $clog2(NUM_FLOWS);

  // qlen term constant, Q32: 80*8 / (gbps * T)
  function automatic longint unsigned k1(int unsigned gbps);
    return ((longint'(QLEN_UNIT) * 8) << 32) / (longint'(gbps) * T_NS);
  endfunction
  // txRate term constant, U_FRAC fraction bits: 128*8 / gbps
  function automatic longint unsigned k2(int unsigned gbps);
    return ((longint'(TXB_UNIT) * 8) << U_FRAC) / longint'(gbps);
  endfunction

  localparam longint unsigned K1_T [7] = '{k1(10), k1(25), k1(40), k1(50), k1(100), k1(200), k1(400)};
  localparam longint unsigned K2_T [7] = '{k2(10), k2(25), k2(40), k2(50), k2(100), k2(200), k2(400)};

  typedef struct packed {
    logic                rec_valid;
    logic [NHOP_W-1:0]   nhop;
    logic [PATHID_W-1:0] path_id;
    int_hop_t [MAX_HOPS-1:0] hop;
    logic [U_W-1:0]      u;
    logic [WIN_W-1:0]    wc;
    logic [STAGE_W-1:0]  stage;
    logic [PSN_W-1:0]    last_seq;
  } flow_st_t;

  flow_st_t st_mem [NUM_FLOWS];

  typedef enum logic [2:0] {S_IDLE, S_CHECK, S_HOP, S_EWMA, S_WIND} state_e;
  state_e state;

  cc_ack_t  ack_r;
  flow_st_t cur;
  logic [2:0]        hop_i;
  logic [2:0]        hop_n;
  logic [U_W-1:0]    u_max;
  logic [TS_W-1:0]   tau;
  logic [U_W-1:0]    u_new;

  function automatic logic [FI_W-1:0] fidx(logic [FLOW_W-1:0] f);
    return FI_W'(f);
  endfunction

  assign init_ready = (state == S_IDLE);
  assign ack_ready  = (state == S_IDLE) && !init_valid;

  // ---------------------------------------------------------- hop datapath
  int_hop_t          a_hop, l_hop;
  logic [TS_W-1:0]   dts;
  logic [TXB_W-1:0]  dbytes;
  logic [QLEN_W-1:0] qmin;
  logic [2:0]        bidx;
  logic [63:0]       term1;
  logic [47:0]       num2;
  logic [21:0]       dts_n;
  logic [47:0]       term2;
  logic [U_W-1:0]    u_hop;

  always_comb begin
    a_hop  = ack_r.intr.hop[hop_i];
    l_hop  = cur.hop[hop_i];
    dts    = a_hop.ts - l_hop.ts;
    dbytes = a_hop.tx_bytes - l_hop.tx_bytes;
    qmin   = (a_hop.qlen < l_hop.qlen) ? a_hop.qlen : l_hop.qlen;
    bidx   = (a_hop.b > 4'd6) ? 3'd4 : a_hop.b[2:0];
    term1  = (64'(qmin) * K1_T[bidx]) >> (32 - U_FRAC);
    num2   = 48'(64'(dbytes) * K2_T[bidx]);
    dts_n  = (dts > TS_W'(22'h3fffff)) ? 22'h3fffff : dts[21:0];
  end

  hpcc_recip_div #(.X_W(48), .N_W(22), .Q_W(48)) u_div_rate (
    .x(num2), .n(dts_n), .q(term2)
  );

  always_comb begin
    logic [63:0] s;
    s = term1 + 64'(term2);
    u_hop = (s > 64'((1 << U_W) - 1)) ? '1 : U_W'(s);
  end

  // ----------------------------------------------------------------- EWMA
  always_comb begin
    logic [TS_W-1:0] tau_c;
    logic [63:0]     acc;
    logic [63:0]     res;
    tau_c = (tau > TS_W'(T_NS)) ? TS_W'(T_NS) : tau;
    acc   = 64'(TS_W'(T_NS) - tau_c) * 64'(cur.u) + 64'(tau_c) * 64'(u_max);
    res   = (acc * INV_T + (64'd1 << 31)) >> 32;
    u_new = (res > 64'((1 << U_W) - 1)) ? '1 : U_W'(res);
  end

  // --------------------------------------------------------------- window
  logic [47:0]      num_md;
  logic [47:0]      w_md_q;
  logic             md_branch;
  logic [WIN_W-1:0] w_next;
  logic [RATE_W-1:0] r_next;
  logic             upd_wc;

  assign num_md    = 48'(cur.wc) * 48'(ETA_Q);
  assign md_branch = (cur.u >= U_W'(ETA_Q)) || (cur.stage >= STAGE_W'(MAX_STAGE));
  assign upd_wc    = $signed(ack_r.seq - cur.last_seq) > 0;

  hpcc_recip_div #(.X_W(48), .N_W(22), .Q_W(48)) u_div_win (
    .x(num_md), .n(cur.u), .q(w_md_q)
  );

  always_comb begin
    logic [48:0] w;
    logic [63:0] r;
    if (md_branch) w = 49'(w_md_q) + 49'(W_AI);
    else           w = 49'(cur.wc) + 49'(W_AI);
    if (w > 49'(W_INIT)) w = 49'(W_INIT);
    w_next = WIN_W'(w);
    r      = (64'(w_next) * RATE_K) >> 16;
    r_next = RATE_W'(r);
  end

  // ------------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      upd_valid     <= 1'b0;
      ev_md         <= 1'b0;
      ev_ai         <= 1'b0;
      ev_wc_update  <= 1'b0;
      ev_path_reset <= 1'b0;
      hop_i         <= '0;
      hop_n         <= '0;
      u_max         <= '0;
      tau           <= '0;
    end else begin
      upd_valid     <= 1'b0;
      ev_md         <= 1'b0;
      ev_ai         <= 1'b0;
      ev_wc_update  <= 1'b0;
      ev_path_reset <= 1'b0;
      case (state)
        S_IDLE: begin
          if (init_valid) begin
            flow_st_t s0;
            s0 = '0;
            s0.wc = WIN_W'(W_INIT);
            st_mem[fidx(init_flow)] <= s0;
          end else if (ack_valid) begin
            ack_r <= ack;
            cur   <= st_mem[fidx(ack.flow)];
            state <= S_CHECK;
          end
        end
        S_CHECK: begin
          hop_i <= '0;
          hop_n <= (ack_r.intr.nhop > NHOP_W'(MAX_HOPS)) ? 3'(MAX_HOPS) : ack_r.intr.nhop[2:0];
          u_max <= '0;
          tau   <= '0;
          if (!cur.rec_valid || cur.path_id != ack_r.intr.path_id ||
              cur.nhop != ack_r.intr.nhop || ack_r.intr.nhop == '0) begin
            flow_st_t s1;
            s1           = cur;
            s1.rec_valid = 1'b1;
            s1.nhop      = ack_r.intr.nhop;
            s1.path_id   = ack_r.intr.path_id;
            s1.hop       = ack_r.intr.hop;
            st_mem[fidx(ack_r.flow)] <= s1;
            ev_path_reset <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_HOP;
          end
        end
        S_HOP: begin
          if (dts != '0 && u_hop > u_max) begin
            u_max <= u_hop;
            tau   <= dts;
          end
          hop_i <= hop_i + 3'd1;
          if (hop_i + 3'd1 >= hop_n) state <= S_EWMA;
        end
        S_EWMA: begin
          cur.u <= u_new;
          state <= S_WIND;
        end
        S_WIND: begin
          flow_st_t s2;
          s2     = cur;
          s2.hop = ack_r.intr.hop;
          if (upd_wc) begin
            s2.wc       = w_next;
            s2.last_seq = ack_r.snd_nxt;
            s2.stage    = md_branch ? '0 : cur.stage + STAGE_W'(1);
          end
          st_mem[fidx(ack_r.flow)] <= s2;
          upd_valid    <= 1'b1;
          upd.flow     <= ack_r.flow;
          upd.win      <= w_next;
          upd.rate     <= r_next;
          ev_md        <= md_branch;
          ev_ai        <= !md_branch;
          ev_wc_update <= upd_wc;
          state        <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // An ACK is only taken while the module is idle.
  assert property (@(posedge clk) disable iff (!rst_n) (ack_valid && ack_ready) |-> state == S_IDLE);

endmodule
