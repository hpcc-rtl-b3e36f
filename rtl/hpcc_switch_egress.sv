// hpcc_switch_egress -- one switch egress port with HPCC INT.
//
// Packets wait in a FIFO queue and leave over a link of LINK speed. The link
// is modelled by a byte budget: emitting a packet of len bytes keeps the link
// busy for len / (bytes per clock) clocks. The port keeps the three status
// values INT reports: a free-running nanosecond timestamp, the total bytes
// sent and the bytes still queued. At the moment a data packet is emitted,
// hpcc_int_stamp writes them into the packet's INT padding (TS = emit time,
// txBytes including this packet, qLen = bytes left behind in the queue).
// Other packets (ACKs, NAKs, control) pass without a record.
//
// Interface: in_valid/in_ready into the queue (ready while not full),
// out_valid/out_ready from a one-packet output register. qlen_bytes shows the
// queue occupancy. Timing: a packet can leave once the link has finished the
// previous one; the minimum is one packet per clock.
//
// HPCC specifies what INT reports and when (on emission at the egress port);
// the queue depth, the link model, the clock-based timestamp and stamping
// only data packets are choices of this design.
module hpcc_switch_egress
  import hpcc_pkg::*;
#(
  parameter int unsigned QUEUE_PKTS = 64,
  parameter logic [B_W-1:0] SPEED   = SPD_100G,
  parameter logic [PATHID_W-1:0] SWITCH_ID = 12'h001,
  parameter int unsigned CLK_NS     = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  pkt_t  in_pkt,
  output logic  in_ready,
  output logic  out_valid,
  output pkt_t  out_pkt,
  input  logic  out_ready,
  output logic [31:0] qlen_bytes
);

  localparam int AW = $clog2(QUEUE_PKTS);
  // link bytes per clock with 8 fraction bits: gbps * CLK_NS / 8
  localparam int unsigned BPC_Q8 = speed_gbps(SPEED) * CLK_NS * 32;

  pkt_t          q_mem [QUEUE_PKTS];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [AW:0]   count;
  logic [TS_W-1:0] ts_ns;
  logic [39:0]   tx_total;
  logic [31:0]   busy_q8;    // remaining link work, bytes with 8 fraction bits

  logic enq, deq, link_free;
  pkt_t head;
  int_hdr_t stamped;

  assign in_ready  = count < (AW+1)'(QUEUE_PKTS);
  assign enq       = in_valid && in_ready;
  assign link_free = busy_q8 <= 32'(BPC_Q8);
  assign deq       = count != '0 && link_free && (!out_valid || out_ready);
  assign head      = q_mem[rd_ptr];

  hpcc_int_stamp u_stamp (
    .hdr_in        (head.intr),
    .switch_id     (SWITCH_ID),
    .speed         (SPEED),
    .ts_ns         (ts_ns),
    .tx_bytes_total(tx_total + 40'(head.len)),
    .qlen_bytes    (qlen_bytes - 32'(head.len)),
    .hdr_out       (stamped)
  );

  always_ff @(posedge clk) begin
    if (enq) q_mem[wr_ptr] <= in_pkt;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr     <= '0;
      wr_ptr     <= '0;
      count      <= '0;
      ts_ns      <= '0;
      tx_total   <= '0;
      busy_q8    <= '0;
      qlen_bytes <= '0;
      out_valid  <= 1'b0;
      out_pkt    <= '0;
    end else begin
      ts_ns <= ts_ns + TS_W'(CLK_NS);
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (enq) wr_ptr <= (wr_ptr == AW'(QUEUE_PKTS - 1)) ? '0 : wr_ptr + AW'(1);
      if (deq) rd_ptr <= (rd_ptr == AW'(QUEUE_PKTS - 1)) ? '0 : rd_ptr + AW'(1);
      count      <= count + (AW+1)'(enq) - (AW+1)'(deq);
      qlen_bytes <= qlen_bytes + (enq ? 32'(in_pkt.len) : 32'd0) - (deq ? 32'(head.len) : 32'd0);
      if (deq) begin
        out_valid <= 1'b1;
        out_pkt   <= head;
        if (head.kind == PKT_DATA) out_pkt.intr <= stamped;
        tx_total  <= tx_total + 40'(head.len);
        busy_q8   <= 32'(head.len) << 8;
      end else if (busy_q8 > 32'(BPC_Q8)) begin
        busy_q8 <= busy_q8 - 32'(BPC_Q8);
      end else begin
        busy_q8 <= '0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(QUEUE_PKTS));

endmodule
