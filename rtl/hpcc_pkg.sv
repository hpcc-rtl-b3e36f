// hpcc_pkg -- types and constants shared by the HPCC NIC and switch blocks.
//
// The INT padding follows the packet format of HPCC: a 4-bit hop count
// (nHop), a 12-bit XOR of the switch IDs on the path (pathID), and one 64-bit
// record per hop holding the egress port speed code B (4 bits), the emit
// timestamp TS (24 bits), the accumulated transmitted bytes txBytes (20 bits,
// unit 128 bytes) and the queue length qLen (16 bits, unit 80 bytes). With
// five hops this is 2 + 5*8 = 42 bytes.
//
// Design choices of this implementation (not fixed by the published design):
// the numeric codes of the speed enum, the timestamp unit (1 ns), the packet
// descriptor used on the MAC side (header fields only, no byte framing), the
// event records that travel between the NIC blocks, and the fixed-point
// formats (U with 14 fraction bits, rate in bytes per clock with 16 fraction
// bits).
package hpcc_pkg;

  // ---------------------------------------------------------------- INT
  localparam int MAX_HOPS   = 5;
  localparam int NHOP_W     = 4;
  localparam int PATHID_W   = 12;
  localparam int B_W        = 4;
  localparam int TS_W       = 24;
  localparam int TXB_W      = 20;
  localparam int QLEN_W     = 16;
  localparam int TXB_UNIT   = 128;  // bytes per txBytes unit
  localparam int QLEN_UNIT  = 80;   // bytes per qLen unit

  // Port speed code carried in field B.
  typedef enum logic [B_W-1:0] {
    SPD_10G  = 4'd0,
    SPD_25G  = 4'd1,
    SPD_40G  = 4'd2,
    SPD_50G  = 4'd3,
    SPD_100G = 4'd4,
    SPD_200G = 4'd5,
    SPD_400G = 4'd6
  } speed_e;

  function automatic int unsigned speed_gbps(logic [B_W-1:0] b);
    case (b)
      4'd0:    return 10;
      4'd1:    return 25;
      4'd2:    return 40;
      4'd3:    return 50;
      4'd4:    return 100;
      4'd5:    return 200;
      4'd6:    return 400;
      default: return 100;
    endcase
  endfunction

  // One hop record: 64 bits.
  typedef struct packed {
    logic [B_W-1:0]    b;
    logic [TS_W-1:0]   ts;
    logic [TXB_W-1:0]  tx_bytes;
    logic [QLEN_W-1:0] qlen;
  } int_hop_t;

  // The INT padding: hop[0] is the first hop on the path.
  typedef struct packed {
    logic [NHOP_W-1:0]   nhop;
    logic [PATHID_W-1:0] path_id;
    int_hop_t [MAX_HOPS-1:0] hop;
  } int_hdr_t;

  // ------------------------------------------------------- NIC widths
  localparam int FLOW_W  = 16;   // flow / QP index
  localparam int QPN_W   = 24;   // destination QP number in the BTH
  localparam int PSN_W   = 24;   // packet sequence number
  localparam int WIN_W   = 24;   // window in bytes
  localparam int RATE_W  = 24;   // rate, bytes per clock, RATE_FRAC fraction bits
  localparam int RATE_FRAC = 16;
  localparam int U_W     = 22;   // normalised inflight bytes U
  localparam int U_FRAC  = 14;
  localparam int STAGE_W = 4;
  localparam int LEN_W   = 16;

  // -------------------------------------------------- packet descriptor
  typedef enum logic [1:0] {
    PKT_DATA = 2'd0,
    PKT_ACK  = 2'd1,
    PKT_NAK  = 2'd2,
    PKT_CTRL = 2'd3
  } pkt_kind_e;

  // RDMA operation carried by a control packet.
  typedef enum logic [1:0] {
    OP_WRITE  = 2'd0,
    OP_READ   = 2'd1,
    OP_REMOVE = 2'd2,
    OP_NONE   = 2'd3
  } rdma_op_e;

  typedef struct packed {
    pkt_kind_e          kind;
    rdma_op_e           op;
    logic [31:0]        src_ip;
    logic [31:0]        dst_ip;
    logic [15:0]        src_port;
    logic [15:0]        dst_port;
    logic [QPN_W-1:0]   dest_qp;
    logic [QPN_W-1:0]   src_qp;
    logic [PSN_W-1:0]   psn;
    logic [LEN_W-1:0]   len;     // bytes on the wire; for OP_WRITE/OP_READ control: message length in packets
    int_hdr_t           intr;
  } pkt_t;

  // ------------------------------------------------------------ events
  // RX pipe -> flow scheduler: ACK or NAK for a local sending flow.
  typedef struct packed {
    logic [FLOW_W-1:0] flow;
    logic [PSN_W-1:0]  psn;
    logic              nak;
    int_hdr_t          intr;
  } ack_note_t;

  // Flow scheduler -> CC module: one ACK with the flow's snd_nxt.
  typedef struct packed {
    logic [FLOW_W-1:0] flow;
    logic [PSN_W-1:0]  seq;
    logic [PSN_W-1:0]  snd_nxt;
    int_hdr_t          intr;
  } cc_ack_t;

  // CC module -> flow scheduler: Update event.
  typedef struct packed {
    logic [FLOW_W-1:0] flow;
    logic [WIN_W-1:0]  win;
    logic [RATE_W-1:0] rate;
  } cc_upd_t;

  // Flow scheduler -> TX pipe: PktSend event.
  typedef struct packed {
    logic [FLOW_W-1:0] flow;
    logic [PSN_W-1:0]  psn;
  } pkt_send_t;

  // RX pipe -> TX pipe: PktRecv event (answer a data packet).
  typedef struct packed {
    logic             nak;
    logic [PSN_W-1:0] psn;   // PSN acknowledged, or PSN expected for a NAK
    pkt_t             pkt;   // the received data packet
  } pkt_recv_t;

  // RX pipe -> flow scheduler and TX pipe: create or remove a flow.
  typedef struct packed {
    logic              remove;
    rdma_op_e          op;
    logic [FLOW_W-1:0] flow;
    logic [PSN_W-1:0]  total_pkts;
    logic [31:0]       local_ip;
    logic [31:0]       peer_ip;
    logic [15:0]       local_port;
    logic [15:0]       peer_port;
    logic [QPN_W-1:0]  peer_qp;
  } flow_ctrl_t;

  // RX pipe -> TX pipe: NAK received, go back to psn.
  typedef struct packed {
    logic [FLOW_W-1:0] flow;
    logic [PSN_W-1:0]  psn;
  } nak_note_t;

  // Monitoring pulses of the NIC, one bit per mechanism.
  typedef struct packed {
    logic md;             // CC: multiplicative window step (Eqn 4)
    logic ai;             // CC: additive window step
    logic wc_update;      // CC: reference window synchronised (once per RTT)
    logic path_reset;     // CC: link records replaced (new flow or new path)
    logic win_block;      // scheduler: credit ready but window full
    logic credit_wait;    // scheduler: window open but pacing credit short
    logic send_conflict;  // scheduler: several engines want to send
    logic gbn;            // TX pipe: go-back-N started by a NAK
    logic oos;            // RX pipe: out-of-sequence data packet
  } nic_ev_t;

endpackage
