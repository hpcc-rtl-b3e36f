// hpcc_int_stamp -- INT insertion of one switch egress port.
//
// When a packet leaves an egress port, the switch adds one to the hop count
// nHop, XORs its 12-bit switch ID into pathID, and writes the port's status
// into the next free hop record: the port speed code B, the emit timestamp
// TS, the accumulated transmitted bytes txBytes (unit 128 bytes) and the
// queue length qLen (unit 80 bytes). The sender uses pathID to notice a path
// change and the records to compute each link's load.
//
// Inputs are the port status in bytes and ns; the unit conversion is done
// here (txBytes keeps the low 20 bits of the 128-byte count and wraps;
// qLen saturates at 16 bits). A packet that already holds MAX_HOPS records
// passes unchanged. Purely combinational.
//
// Field sizes, units and the nHop/pathID rules follow HPCC's packet format;
// saturation at MAX_HOPS and of qLen is this design's choice.
module hpcc_int_stamp
  import hpcc_pkg::*;
(
  input  int_hdr_t            hdr_in,
  input  logic [PATHID_W-1:0] switch_id,
  input  logic [B_W-1:0]      speed,
  input  logic [TS_W-1:0]     ts_ns,
  input  logic [39:0]         tx_bytes_total,  // bytes sent by the port so far
  input  logic [31:0]         qlen_bytes,      // bytes queued at the port
  output int_hdr_t            hdr_out
);

  int_hop_t  rec;
  logic [31:0] qunits;

  always_comb begin
    qunits       = qlen_bytes / 32'(QLEN_UNIT);
    rec.b        = speed;
    rec.ts       = ts_ns;
    rec.tx_bytes = TXB_W'(tx_bytes_total >> $clog2(TXB_UNIT));
    rec.qlen     = (qunits > 32'hffff) ? 16'hffff : qunits[15:0];

    hdr_out = hdr_in;
    if (hdr_in.nhop < NHOP_W'(MAX_HOPS)) begin
      hdr_out.nhop    = hdr_in.nhop + NHOP_W'(1);
      hdr_out.path_id = hdr_in.path_id ^ switch_id;
      hdr_out.hop[hdr_in.nhop[2:0]] = rec;
    end
  end

endmodule
