// hpcc_flow_sched -- HPCC flow scheduler with several independent engines.
//
// One engine (hpcc_flow_engine) can pace only a limited number of flows at
// line rate, because it visits its array one slot per clock. The scheduler
// therefore splits the flows over NUM_ENGINES engines: flow f lives in engine
// f / FPE, slot f % FPE. The engines run in parallel; their PktSend requests
// meet in a round-robin arbiter in front of the single TX pipe.
//
// Event routing (the arrows around the flow scheduler in the NIC):
//   * ACK/NAK notify from the RX pipe updates the flow's snd_una (and, for a
//     NAK, rewinds snd_nxt). An ACK is also passed to the CC module together
//     with the flow's current snd_nxt, so the handshake waits for the CC
//     module to be ready.
//   * Update events from the CC module set the flow's window and rate.
//   * Create/remove requests from the RX pipe (control packets carrying an
//     RDMA operation) set up or free a slot and reset the flow's CC state.
//
// Timing: PktSend events leave at most one per clock; every engine visits a
// slot per clock. All commands are single-cycle when accepted.
//
// The engine count (6) and flows per engine (50) are HPCC's FPGA prototype
// figures (300 flows per 25GE port). The flow-to-engine mapping and the
// arbiter are choices of this design.
module hpcc_flow_sched
  import hpcc_pkg::*;
#(
  parameter int unsigned NUM_ENGINES = 6,
  parameter int unsigned FPE         = 50,
  parameter int unsigned PKT_BYTES   = 1000,
  parameter int unsigned W_INIT      = 28125,
  parameter int unsigned R_INIT      = 1024000
) (
  input  logic       clk,
  input  logic       rst_n,
  // RX pipe: ACK / NAK notify
  input  logic       note_valid,
  input  ack_note_t  note,
  output logic       note_ready,
  // RX pipe: create / remove flow
  input  logic       ctl_valid,
  input  flow_ctrl_t ctl,
  output logic       ctl_ready,
  // CC module
  output logic       cc_ack_valid,
  output cc_ack_t    cc_ack,
  input  logic       cc_ack_ready,
  output logic       cc_init_valid,
  output logic [FLOW_W-1:0] cc_init_flow,
  input  logic       cc_init_ready,
  input  logic       upd_valid,
  input  cc_upd_t    upd,
  // TX pipe: PktSend
  output logic       send_valid,
  output pkt_send_t  send,
  input  logic       send_ready,
  // monitoring pulses
  output logic       ev_win_block,
  output logic       ev_credit_wait,
  output logic       ev_send_conflict
);

  localparam int SW = $clog2(FPE);
  localparam int EW = (NUM_ENGINES > 1) ? $clog2(NUM_ENGINES) : 1;

  function automatic logic [EW-1:0] eng_of(logic [FLOW_W-1:0] f);
    return EW'(f / FLOW_W'(FPE));
  endfunction
  function automatic logic [SW-1:0] slot_of(logic [FLOW_W-1:0] f);
    return SW'(f % FLOW_W'(FPE));
  endfunction

  logic             e_send_valid [NUM_ENGINES];
  logic [SW-1:0]    e_send_slot  [NUM_ENGINES];
  logic [PSN_W-1:0] e_send_psn   [NUM_ENGINES];
  logic             e_send_ready [NUM_ENGINES];
  logic [PSN_W-1:0] e_rd_snd_nxt [NUM_ENGINES];
  logic [NUM_ENGINES-1:0] e_win_block, e_credit_wait, e_req;

  logic [EW-1:0] note_eng, ctl_eng, upd_eng;
  logic          note_fire, ctl_fire;

  assign note_eng = eng_of(note.flow);
  assign ctl_eng  = eng_of(ctl.flow);
  assign upd_eng  = eng_of(upd.flow);

  // NAKs do not go to the CC module; ACKs wait for it.
  assign note_ready = note.nak ? 1'b1 : cc_ack_ready;
  assign note_fire  = note_valid && note_ready;
  assign ctl_ready  = cc_init_ready;
  assign ctl_fire   = ctl_valid && ctl_ready;

  assign cc_ack_valid   = note_valid && !note.nak;
  assign cc_ack.flow    = note.flow;
  assign cc_ack.seq     = note.psn;
  assign cc_ack.snd_nxt = e_rd_snd_nxt[note_eng];
  assign cc_ack.intr    = note.intr;

  assign cc_init_valid = ctl_valid;
  assign cc_init_flow  = ctl.flow;

  // --------------------------------------------------------------- engines
  for (genvar g = 0; g < int'(NUM_ENGINES); g++) begin : g_eng
    hpcc_flow_engine #(
      .FPE(FPE), .PKT_BYTES(PKT_BYTES), .W_INIT(W_INIT), .R_INIT(R_INIT)
    ) u_eng (
      .clk, .rst_n,
      .ctl_valid (ctl_fire && ctl_eng == EW'(g)),
      .ctl_remove(ctl.remove),
      .ctl_slot  (slot_of(ctl.flow)),
      .ctl_total (ctl.total_pkts),
      .ack_valid (note_fire && note_eng == EW'(g)),
      .ack_nak   (note.nak),
      .ack_slot  (slot_of(note.flow)),
      .ack_psn   (note.psn),
      .upd_valid (upd_valid && upd_eng == EW'(g)),
      .upd_slot  (slot_of(upd.flow)),
      .upd_win   (upd.win),
      .upd_rate  (upd.rate),
      .send_valid(e_send_valid[g]),
      .send_slot (e_send_slot[g]),
      .send_psn  (e_send_psn[g]),
      .send_ready(e_send_ready[g]),
      .rd_slot   (slot_of(note.flow)),
      .rd_snd_nxt(e_rd_snd_nxt[g]),
      .ev_win_block  (e_win_block[g]),
      .ev_credit_wait(e_credit_wait[g])
    );
    assign e_req[g] = e_send_valid[g];
  end

  // ------------------------------------------------- round-robin arbiter
  // Engines step through their slots in lock-step, so the same slot of two
  // engines asks in the same clock every round. An engine that asked and was
  // refused is marked; marked engines win first (in round-robin order), so
  // two colliding flows alternate instead of one starving the other.
  logic [EW-1:0] last_grant;
  logic [EW-1:0] grant;
  logic          any_req, any_lost;
  logic [NUM_ENGINES-1:0] lost;

  always_comb begin
    grant    = '0;
    any_req  = 1'b0;
    any_lost = |(e_req & lost);
    for (int i = 1; i <= int'(NUM_ENGINES); i++) begin
      logic [EW-1:0] c;
      c = EW'((int'(last_grant) + i) % int'(NUM_ENGINES));
      if (!any_req && e_req[c] && (lost[c] || !any_lost)) begin
        any_req = 1'b1;
        grant   = c;
      end
    end
  end

  always_comb begin
    for (int g = 0; g < int'(NUM_ENGINES); g++)
      e_send_ready[g] = send_ready && any_req && (grant == EW'(g));
  end

  assign send_valid = any_req;
  assign send.flow  = FLOW_W'(grant) * FLOW_W'(FPE) + FLOW_W'(e_send_slot[grant]);
  assign send.psn   = e_send_psn[grant];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last_grant <= EW'(NUM_ENGINES - 1);
      lost       <= '0;
    end else if (send_valid && send_ready) begin
      last_grant <= grant;
      for (int g = 0; g < int'(NUM_ENGINES); g++)
        if (e_req[g]) lost[g] <= (grant != EW'(g));
    end
  end

  assign ev_win_block     = |e_win_block;
  assign ev_credit_wait   = |e_credit_wait;
  assign ev_send_conflict = (e_req & (e_req - 1'b1)) != '0;

endmodule
