// hpcc_rx_pipe -- receive pipe of the HPCC NIC.
//
// Parses each packet descriptor from the MAC and raises the matching event:
//   * data packet: looks up the receiving QP's expected PSN. In sequence ->
//     PktRecv(ACK) to the TX pipe and the expected PSN advances. Ahead of
//     sequence -> PktRecv(NAK with the expected PSN), once per gap; further
//     out-of-sequence packets are dropped silently until the gap is filled.
//     Behind (a duplicate) -> ACK again.
//   * ACK: notify the flow scheduler (which passes it on to the CC module)
//     with the acknowledged PSN and the INT records.
//   * NAK: notify the TX pipe to go back to the NAK's PSN and the flow
//     scheduler to rewind its send pointer.
//   * control packet with an RDMA operation (WRITE or READ): create the flow
//     named by dest_qp, sending len packets to the packet's source; REMOVE
//     frees it. The receiving QP's expected PSN is reset as well.
//
// The RX pipe is combinational: a packet is taken (rx_ready) in the cycle
// the event it causes is taken by its consumer. The event list follows HPCC;
// the NAK-once rule, the handling of duplicates and the control packet
// fields are choices of this design.
module hpcc_rx_pipe
  import hpcc_pkg::*;
#(
  parameter int unsigned NUM_FLOWS = 300
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_valid,
  input  pkt_t       rx_pkt,
  output logic       rx_ready,
  // to TX pipe
  output logic       recv_valid,
  output pkt_recv_t  recv,
  input  logic       recv_ready,
  output logic       nak_valid,
  output nak_note_t  nak,
  // to flow scheduler
  output logic       note_valid,
  output ack_note_t  note,
  input  logic       note_ready,
  output logic       ctl_valid,
  output flow_ctrl_t ctl,
  input  logic       ctl_ready,
  output logic       ev_oos        // out-of-sequence data packet seen
);

  localparam int FI_W = $clog2(NUM_FLOWS);

  logic [PSN_W-1:0] epsn     [NUM_FLOWS];
  logic             nak_sent [NUM_FLOWS];

  logic [FI_W-1:0]  qp;
  logic [PSN_W-1:0] exp_psn;
  logic             in_seq, ahead, is_data;

  assign qp      = FI_W'(rx_pkt.dest_qp);
  assign exp_psn = epsn[qp];
  assign in_seq  = rx_pkt.psn == exp_psn;
  assign ahead   = $signed(rx_pkt.psn - exp_psn) > 0;
  assign is_data = rx_valid && rx_pkt.kind == PKT_DATA;

  always_comb begin
    recv_valid = is_data && !(ahead && nak_sent[qp]);
    recv.nak   = ahead;
    recv.psn   = ahead ? exp_psn : rx_pkt.psn;
    recv.pkt   = rx_pkt;

    note_valid = rx_valid && (rx_pkt.kind == PKT_ACK || rx_pkt.kind == PKT_NAK);
    note.flow  = FLOW_W'(rx_pkt.dest_qp);
    note.psn   = rx_pkt.psn;
    note.nak   = rx_pkt.kind == PKT_NAK;
    note.intr  = rx_pkt.intr;

    nak_valid  = rx_valid && rx_pkt.kind == PKT_NAK && note_ready;
    nak.flow   = FLOW_W'(rx_pkt.dest_qp);
    nak.psn    = rx_pkt.psn;

    ctl_valid      = rx_valid && rx_pkt.kind == PKT_CTRL;
    ctl.remove     = rx_pkt.op == OP_REMOVE;
    ctl.op         = rx_pkt.op;
    ctl.flow       = FLOW_W'(rx_pkt.dest_qp);
    ctl.total_pkts = PSN_W'(rx_pkt.len);
    ctl.local_ip   = rx_pkt.dst_ip;
    ctl.peer_ip    = rx_pkt.src_ip;
    ctl.local_port = rx_pkt.dst_port;
    ctl.peer_port  = rx_pkt.src_port;
    ctl.peer_qp    = rx_pkt.src_qp;

    case (rx_pkt.kind)
      PKT_DATA: rx_ready = (ahead && nak_sent[qp]) ? 1'b1 : recv_ready;
      PKT_ACK,
      PKT_NAK:  rx_ready = note_ready;
      default:  rx_ready = ctl_ready;
    endcase
  end

  assign ev_oos = is_data && rx_ready && ahead;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NUM_FLOWS); i++) begin
        epsn[i]     <= '0;
        nak_sent[i] <= 1'b0;
      end
    end else if (rx_valid && rx_ready) begin
      if (rx_pkt.kind == PKT_DATA) begin
        if (in_seq) begin
          epsn[qp]     <= exp_psn + PSN_W'(1);
          nak_sent[qp] <= 1'b0;
        end else if (ahead) begin
          nak_sent[qp] <= 1'b1;
        end
      end else if (rx_pkt.kind == PKT_CTRL) begin
        epsn[qp]     <= '0;
        nak_sent[qp] <= 1'b0;
      end
    end
  end

endmodule
