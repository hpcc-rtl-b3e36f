// hpcc_tx_pipe -- transmit pipe of the HPCC NIC.
//
// Turns events into packet descriptors for the MAC:
//   * PktSend (flow, psn) from the flow scheduler -> a data packet of the
//     flow, built from the flow context: addresses and ports (the UDP/IP
//     part of the 5-tuple), destination QP, RDMA operation and the PSN. The
//     INT padding starts empty (nHop = 0, pathID = 0), as a sender sets it.
//   * PktRecv from the RX pipe -> an ACK (or a NAK for an out-of-sequence
//     data packet) back to the data packet's source, carrying a copy of all
//     INT records the data packet collected on its way.
//   * A NAK notice from the RX pipe starts go-back-N: the flow's PSN context
//     returns to the PSN the receiver expects. (The flow scheduler rewinds its
//     own send pointer from the same NAK, so the next PktSend carries it.)
//   * Create events load a flow's context.
//
// One output register holds the packet for the MAC (mac_valid/mac_ready).
// Replies (ACK/NAK) have priority over data. Each accepted event gives one
// packet on the next clock. The event-driven structure follows HPCC; the
// descriptor format, the ACK length and reply priority are choices of this
// design, and the header fields are not serialised into bytes here.
module hpcc_tx_pipe
  import hpcc_pkg::*;
#(
  parameter int unsigned NUM_FLOWS = 300,
  parameter int unsigned PKT_BYTES = 1000,
  parameter int unsigned ACK_BYTES = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ctl_valid,
  input  flow_ctrl_t ctl,
  input  logic       send_valid,
  input  pkt_send_t  send,
  output logic       send_ready,
  input  logic       recv_valid,
  input  pkt_recv_t  recv,
  output logic       recv_ready,
  input  logic       nak_valid,
  input  nak_note_t  nak,
  output logic       mac_valid,
  output pkt_t       mac_pkt,
  input  logic       mac_ready,
  output logic       ev_gbn       // go-back-N started
);

  localparam int FI_W = $clog2(NUM_FLOWS);

  typedef struct packed {
    rdma_op_e         op;
    logic [31:0]      local_ip;
    logic [31:0]      peer_ip;
    logic [15:0]      local_port;
    logic [15:0]      peer_port;
    logic [QPN_W-1:0] peer_qp;
  } ctx_t;

  ctx_t             ctx     [NUM_FLOWS];
  logic [PSN_W-1:0] ctx_psn [NUM_FLOWS];

  logic slot_free;
  assign slot_free  = !mac_valid || mac_ready;
  assign recv_ready = slot_free;
  assign send_ready = slot_free && !recv_valid;

  ctx_t c;
  assign c = ctx[FI_W'(send.flow)];

  pkt_t data_pkt, reply_pkt;

  always_comb begin
    data_pkt          = '0;
    data_pkt.kind     = PKT_DATA;
    data_pkt.op       = c.op;
    data_pkt.src_ip   = c.local_ip;
    data_pkt.dst_ip   = c.peer_ip;
    data_pkt.src_port = c.local_port;
    data_pkt.dst_port = c.peer_port;
    data_pkt.dest_qp  = c.peer_qp;
    data_pkt.src_qp   = QPN_W'(send.flow);
    data_pkt.psn      = ctx_psn[FI_W'(send.flow)];
    data_pkt.len      = LEN_W'(PKT_BYTES);

    reply_pkt          = '0;
    reply_pkt.kind     = recv.nak ? PKT_NAK : PKT_ACK;
    reply_pkt.op       = OP_NONE;
    reply_pkt.src_ip   = recv.pkt.dst_ip;
    reply_pkt.dst_ip   = recv.pkt.src_ip;
    reply_pkt.src_port = recv.pkt.dst_port;
    reply_pkt.dst_port = recv.pkt.src_port;
    reply_pkt.dest_qp  = recv.pkt.src_qp;
    reply_pkt.src_qp   = recv.pkt.dest_qp;
    reply_pkt.psn      = recv.psn;
    reply_pkt.len      = LEN_W'(ACK_BYTES);
    reply_pkt.intr     = recv.pkt.intr;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mac_valid <= 1'b0;
      mac_pkt   <= '0;
      ev_gbn    <= 1'b0;
      for (int i = 0; i < int'(NUM_FLOWS); i++) ctx_psn[i] <= '0;
    end else begin
      ev_gbn <= 1'b0;
      if (mac_valid && mac_ready) mac_valid <= 1'b0;
      if (recv_valid && recv_ready) begin
        mac_valid <= 1'b1;
        mac_pkt   <= reply_pkt;
      end else if (send_valid && send_ready) begin
        mac_valid <= 1'b1;
        mac_pkt   <= data_pkt;
        ctx_psn[FI_W'(send.flow)] <= ctx_psn[FI_W'(send.flow)] + PSN_W'(1);
      end
      if (nak_valid) begin
        ctx_psn[FI_W'(nak.flow)] <= nak.psn;
        ev_gbn <= 1'b1;
      end
      if (ctl_valid) begin
        ctx[FI_W'(ctl.flow)] <= '{op: ctl.op, local_ip: ctl.local_ip, peer_ip: ctl.peer_ip,
                                  local_port: ctl.local_port, peer_port: ctl.peer_port,
                                  peer_qp: ctl.peer_qp};
        ctx_psn[FI_W'(ctl.flow)] <= '0;
      end
    end
  end

  // The TX pipe's PSN context and the scheduler's send pointer agree.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (send_valid && send_ready && !(nak_valid && nak.flow == send.flow))
                   |-> send.psn == ctx_psn[FI_W'(send.flow)]);

endmodule
