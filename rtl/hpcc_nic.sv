// hpcc_nic -- the HPCC logic of a NIC, between the PCIe and MAC modules.
//
// Four blocks, connected by events:
//
//   MAC rx --> RX pipe --PktRecv-------------------------> TX pipe --> MAC tx
//                 |  \--NAK (go-back-N)-----------------/^
//                 |--ACK/NAK notify, create/remove--> flow scheduler --PktSend--^
//                 |                                    |   ^
//                 |                              Notify|   |Update (W, R)
//                 |                                    v   |
//                 |                                  CC module
//                 \--create/remove (flow context)-> TX pipe
//
// The node is both sender and receiver. As a receiver it answers each data
// packet with an ACK (or NAK) that carries the packet's INT records. As a
// sender it paces its flows (flow scheduler), reacts to each returning ACK
// with a new window and rate (CC module) and handles go-back-N.
//
// Ports: mac_rx_* / mac_tx_* are packet descriptor streams with valid/ready;
// they stand for the vendor MAC. host_upd_* shows every Update event, the
// state the host side (vendor PCIe module) may read. ev reports one pulse per
// mechanism for monitoring.
//
// Parameter defaults are HPCC's prototype and testbed settings: 6 engines x
// 50 flows, 25 Gbit/s NIC, T = 9 us, 5 ns clock, W_AI = 80 bytes,
// maxStage = 5, eta = 95 %. The 1000-byte packet is this design's choice.
module hpcc_nic
  import hpcc_pkg::*;
#(
  parameter int unsigned NUM_ENGINES = 6,
  parameter int unsigned FPE         = 50,
  parameter int unsigned T_NS        = 9000,
  parameter int unsigned CLK_NS      = 5,
  parameter int unsigned NIC_GBPS    = 25,
  parameter int unsigned W_AI        = 80,
  parameter int unsigned MAX_STAGE   = 5,
  parameter int unsigned ETA_PCT     = 95,
  parameter int unsigned PKT_BYTES   = 1000
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    mac_rx_valid,
  input  pkt_t    mac_rx_pkt,
  output logic    mac_rx_ready,
  output logic    mac_tx_valid,
  output pkt_t    mac_tx_pkt,
  input  logic    mac_tx_ready,
  output logic    host_upd_valid,
  output cc_upd_t host_upd,
  output nic_ev_t ev
);

  localparam int unsigned NUM_FLOWS = NUM_ENGINES * FPE;
  localparam int unsigned W_INIT    = NIC_GBPS * T_NS / 8;
  localparam int unsigned R_INIT    = NIC_GBPS * CLK_NS * (1 << RATE_FRAC) / 8;

  logic       recv_valid, recv_ready;
  pkt_recv_t  recv;
  logic       nak_valid;
  nak_note_t  nak;
  logic       note_valid, note_ready;
  ack_note_t  note;
  logic       ctl_valid, ctl_ready;
  flow_ctrl_t ctl;
  logic       cc_ack_valid, cc_ack_ready;
  cc_ack_t    cc_ack;
  logic       cc_init_valid, cc_init_ready;
  logic [FLOW_W-1:0] cc_init_flow;
  logic       upd_valid;
  cc_upd_t    upd;
  logic       send_valid, send_ready;
  pkt_send_t  send;

  hpcc_rx_pipe #(.NUM_FLOWS(NUM_FLOWS)) u_rx (
    .clk, .rst_n,
    .rx_valid(mac_rx_valid), .rx_pkt(mac_rx_pkt), .rx_ready(mac_rx_ready),
    .recv_valid, .recv, .recv_ready,
    .nak_valid, .nak,
    .note_valid, .note, .note_ready,
    .ctl_valid, .ctl, .ctl_ready,
    .ev_oos(ev.oos)
  );

  hpcc_flow_sched #(
    .NUM_ENGINES(NUM_ENGINES), .FPE(FPE), .PKT_BYTES(PKT_BYTES),
    .W_INIT(W_INIT), .R_INIT(R_INIT)
  ) u_sched (
    .clk, .rst_n,
    .note_valid, .note, .note_ready,
    .ctl_valid, .ctl, .ctl_ready,
    .cc_ack_valid, .cc_ack, .cc_ack_ready,
    .cc_init_valid, .cc_init_flow, .cc_init_ready,
    .upd_valid, .upd,
    .send_valid, .send, .send_ready,
    .ev_win_block(ev.win_block), .ev_credit_wait(ev.credit_wait),
    .ev_send_conflict(ev.send_conflict)
  );

  hpcc_cc #(
    .NUM_FLOWS(NUM_FLOWS), .T_NS(T_NS), .CLK_NS(CLK_NS), .NIC_GBPS(NIC_GBPS),
    .W_AI(W_AI), .MAX_STAGE(MAX_STAGE), .ETA_PCT(ETA_PCT)
  ) u_cc (
    .clk, .rst_n,
    .init_valid(cc_init_valid), .init_flow(cc_init_flow), .init_ready(cc_init_ready),
    .ack_valid(cc_ack_valid), .ack(cc_ack), .ack_ready(cc_ack_ready),
    .upd_valid, .upd,
    .ev_md(ev.md), .ev_ai(ev.ai), .ev_wc_update(ev.wc_update),
    .ev_path_reset(ev.path_reset)
  );

  hpcc_tx_pipe #(.NUM_FLOWS(NUM_FLOWS), .PKT_BYTES(PKT_BYTES)) u_tx (
    .clk, .rst_n,
    .ctl_valid(ctl_valid && ctl_ready), .ctl,
    .send_valid, .send, .send_ready,
    .recv_valid, .recv, .recv_ready,
    .nak_valid, .nak,
    .mac_valid(mac_tx_valid), .mac_pkt(mac_tx_pkt), .mac_ready(mac_tx_ready),
    .ev_gbn(ev.gbn)
  );

  assign host_upd_valid = upd_valid;
  assign host_upd       = upd;

endmodule
