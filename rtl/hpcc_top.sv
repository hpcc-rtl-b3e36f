// hpcc_top -- the two hardware parts of HPCC side by side.
//
// HPCC needs two pieces of hardware: a NIC that runs the sender algorithm
// and acknowledges received data with the INT records copied back
// (hpcc_nic), and switches whose egress ports write INT records into passing
// data packets (hpcc_switch_egress). In a network they meet only through
// links, so this top brings out both as independent ports: the NIC's MAC-side
// packet streams and Update monitor, and the switch port's input and output
// streams. Wiring the NIC's output through one or more switch ports and back
// into a NIC closes the control loop.
//
// All parameters are the blocks' defaults: a 25 Gbit/s NIC with 6 x 50
// flows and T = 9 us, and a 100 Gbit/s switch port with a 64-packet queue.
module hpcc_top
  import hpcc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // NIC, MAC side
  input  logic    nic_rx_valid,
  input  pkt_t    nic_rx_pkt,
  output logic    nic_rx_ready,
  output logic    nic_tx_valid,
  output pkt_t    nic_tx_pkt,
  input  logic    nic_tx_ready,
  output logic    nic_upd_valid,
  output cc_upd_t nic_upd,
  output nic_ev_t nic_ev,
  // switch egress port
  input  logic    sw_in_valid,
  input  pkt_t    sw_in_pkt,
  output logic    sw_in_ready,
  output logic    sw_out_valid,
  output pkt_t    sw_out_pkt,
  input  logic    sw_out_ready,
  output logic [31:0] sw_qlen_bytes
);

  hpcc_nic u_nic (
    .clk, .rst_n,
    .mac_rx_valid(nic_rx_valid), .mac_rx_pkt(nic_rx_pkt), .mac_rx_ready(nic_rx_ready),
    .mac_tx_valid(nic_tx_valid), .mac_tx_pkt(nic_tx_pkt), .mac_tx_ready(nic_tx_ready),
    .host_upd_valid(nic_upd_valid), .host_upd(nic_upd),
    .ev(nic_ev)
  );

  hpcc_switch_egress u_sw (
    .clk, .rst_n,
    .in_valid(sw_in_valid), .in_pkt(sw_in_pkt), .in_ready(sw_in_ready),
    .out_valid(sw_out_valid), .out_pkt(sw_out_pkt), .out_ready(sw_out_ready),
    .qlen_bytes(sw_qlen_bytes)
  );

endmodule
