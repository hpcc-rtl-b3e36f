// tb_hpcc_incast -- incast workload: seven senders join a long-running flow
// on one 25 Gbit/s switch port.
//
// Nine NICs (hpcc_nic with one engine each, as only one flow per NIC is
// used) and one switch egress port (hpcc_switch_egress, 25 Gbit/s towards
// the receiver, 512-packet queue). The testbench models the wires, at 5 ns
// per clock:
//   sender NIC s --MAC 25G, 270 clk--> switch port --270 clk--> receiver NIC
//   receiver NIC --ACK, MAC 25G, 540 clk--> sender NIC s
// The base RTT is about 5.4 us (the testbed's in-rack RTT), below T = 9 us.
// Sender 0 runs a long flow (2500 packets of 1000 bytes) from the start.
// At clock 30000 senders 1..7 start a 150-packet flow each towards the same
// receiver: an 8-to-1 overload of the port.
//
// Checks, with the expected behaviour of HPCC:
//   * the queue the line-rate start builds is bounded by the in-flight
//     windows (at most 8 x W_init = 225 KB) and drains below 10 KB within
//     twice the time the port needs to send the peak queue (the senders
//     cut their windows after about one round trip; the queue can drain no
//     faster than the port's line rate);
//   * the port stays busy (utilisation >= 85 %) while the flows share it;
//   * the flows share it fairly: the slowest incast flow moves at least half
//     the bytes of the fastest in the shared interval;
//   * the long flow returns to at least 85 % of line rate (measured in 5 us
//     bins) within 100 us after the incast flows have finished: maxStage = 5
//     additive rounds of one RTT each, then a multiplicative step, and it
//     stays there;
//   * every message is delivered completely and in order.
// The topology and timing follow the testbed's incast micro-benchmark as far
// as one switch port can; message sizes and the start time are this test's.
module tb_hpcc_incast;
  import hpcc_pkg::*;
  localparam int NS = 8;                  // senders
  localparam int MSG_LONG = 2500;
  localparam int MSG_INC  = 150;
  localparam longint X_START = 30000;
  localparam logic [31:0] RCV_IP = 32'h0a000101;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always #2.5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @cycle %0d", what, cyc); end
  endtask

  function automatic logic [31:0] snd_ip(int s);
    return 32'h0a000001 + 32'(s);
  endfunction

  // ------------------------------------------------------------- the DUTs
  logic    s_rx_valid [NS], s_rx_ready [NS], s_tx_valid [NS], s_tx_ready [NS];
  pkt_t    s_rx_pkt [NS], s_tx_pkt [NS];
  logic    s_upd_valid [NS];
  cc_upd_t s_upd [NS];
  nic_ev_t s_ev [NS];

  for (genvar s = 0; s < NS; s++) begin : g_snd
    hpcc_nic #(.NUM_ENGINES(1)) u_nic (
      .clk, .rst_n,
      .mac_rx_valid(s_rx_valid[s]), .mac_rx_pkt(s_rx_pkt[s]), .mac_rx_ready(s_rx_ready[s]),
      .mac_tx_valid(s_tx_valid[s]), .mac_tx_pkt(s_tx_pkt[s]), .mac_tx_ready(s_tx_ready[s]),
      .host_upd_valid(s_upd_valid[s]), .host_upd(s_upd[s]), .ev(s_ev[s])
    );
  end

  logic    r_rx_valid, r_rx_ready, r_tx_valid, r_tx_ready, r_upd_valid;
  pkt_t    r_rx_pkt, r_tx_pkt;
  cc_upd_t r_upd;
  nic_ev_t r_ev;
  hpcc_nic #(.NUM_ENGINES(1)) u_rcv (
    .clk, .rst_n,
    .mac_rx_valid(r_rx_valid), .mac_rx_pkt(r_rx_pkt), .mac_rx_ready(r_rx_ready),
    .mac_tx_valid(r_tx_valid), .mac_tx_pkt(r_tx_pkt), .mac_tx_ready(r_tx_ready),
    .host_upd_valid(r_upd_valid), .host_upd(r_upd), .ev(r_ev)
  );

  logic        sw_in_valid, sw_in_ready, sw_out_valid, sw_out_ready;
  pkt_t        sw_in_pkt, sw_out_pkt;
  logic [31:0] sw_qlen;
  hpcc_switch_egress #(.QUEUE_PKTS(512), .SPEED(SPD_25G), .SWITCH_ID(12'h00a)) u_sw (
    .clk, .rst_n,
    .in_valid(sw_in_valid), .in_pkt(sw_in_pkt), .in_ready(sw_in_ready),
    .out_valid(sw_out_valid), .out_pkt(sw_out_pkt), .out_ready(sw_out_ready),
    .qlen_bytes(sw_qlen)
  );

  // --------------------------------------------------------------- wires
  pkt_t   fwd_pkt [$];  longint fwd_due [$];     // senders -> switch
  pkt_t   ret_pkt [$];  longint ret_due [$];     // switch -> receiver
  pkt_t   ack_pkt [NS][$];  longint ack_due [NS][$];  // receiver -> sender s
  pkt_t   ctl_pkt [NS][$];                       // control packets to sender s
  longint s_tok [NS];                            // MAC budget, bytes x 8
  longint r_tok;

  for (genvar s = 0; s < NS; s++) begin : g_wire
    assign s_tx_ready[s] = s_tok[s] >= longint'(s_tx_pkt[s].len) * 8;
    always_comb begin
      if (ctl_pkt[s].size() > 0) begin
        s_rx_valid[s] = 1'b1; s_rx_pkt[s] = ctl_pkt[s][0];
      end else begin
        s_rx_valid[s] = ack_pkt[s].size() > 0 && ack_due[s][0] <= cyc;
        s_rx_pkt[s]   = ack_pkt[s].size() > 0 ? ack_pkt[s][0] : '0;
      end
    end
  end
  assign r_tx_ready   = r_tok >= longint'(r_tx_pkt.len) * 8;
  assign sw_out_ready = 1'b1;
  always_comb begin
    sw_in_valid = fwd_pkt.size() > 0 && fwd_due[0] <= cyc;
    sw_in_pkt   = fwd_pkt.size() > 0 ? fwd_pkt[0] : '0;
    r_rx_valid  = ret_pkt.size() > 0 && ret_due[0] <= cyc;
    r_rx_pkt    = ret_pkt.size() > 0 ? ret_pkt[0] : '0;
  end

  // ------------------------------------------------------------ measuring
  int     acked [NS];
  int     q_max = 0;
  longint t_drain = -1;
  longint t_inc_done = -1;
  longint bytes_out = 0;                       // port output, shared interval
  longint share [NS];                          // per-flow bytes, shared interval
  longint bin_bytes = 0, bin_end = -1;        // long flow after the incast
  longint t_recover = -1;
  int     bins_low_after = 0;                  // bins below 85 % after recovery
  localparam longint SH_START = X_START + 20000, SH_END = X_START + 50000;

  always @(posedge clk) if (rst_n) begin
    if (cyc >= X_START && int'(sw_qlen) > q_max) q_max = int'(sw_qlen);
    if (t_drain < 0 && cyc > X_START + 2000 && q_max > 20000 && sw_qlen < 10000) t_drain = cyc;

    for (int s = 0; s < NS; s++) begin
      s_tok[s] = s_tok[s] + 125;
      if (s_tok[s] > 9000) s_tok[s] = 9000;
      if (s_tx_valid[s] && s_tx_ready[s]) begin
        s_tok[s] -= longint'(s_tx_pkt[s].len) * 8;
        fwd_pkt.push_back(s_tx_pkt[s]); fwd_due.push_back(cyc + 270);
      end
      if (s_rx_valid[s] && s_rx_ready[s]) begin
        if (ctl_pkt[s].size() > 0) void'(ctl_pkt[s].pop_front());
        else begin void'(ack_pkt[s].pop_front()); void'(ack_due[s].pop_front()); end
      end
    end
    if (sw_in_valid && sw_in_ready) begin void'(fwd_pkt.pop_front()); void'(fwd_due.pop_front()); end
    if (sw_out_valid && sw_out_ready) begin
      int s;
      s = int'(sw_out_pkt.src_ip - snd_ip(0));
      ret_pkt.push_back(sw_out_pkt); ret_due.push_back(cyc + 270);
      if (cyc >= SH_START && cyc < SH_END) begin
        bytes_out += longint'(sw_out_pkt.len);
        if (s >= 0 && s < NS) share[s] += longint'(sw_out_pkt.len);
      end
      if (s == 0 && t_inc_done >= 0) bin_bytes += longint'(sw_out_pkt.len);
    end
    if (t_inc_done >= 0 && bin_end < 0) begin bin_end = cyc + 1000; bin_bytes = 0; end
    if (bin_end >= 0 && cyc == bin_end) begin
      // 1000 clocks at 15.625 B/clk = 15625 B; 85 % = 13281 B
      if (bin_bytes >= 13281 && t_recover < 0) t_recover = cyc;
      else if (bin_bytes < 13281 && t_recover >= 0 && acked[0] < MSG_LONG - 30) bins_low_after++;
      bin_bytes = 0; bin_end = cyc + 1000;
    end
    if (r_rx_valid && r_rx_ready) begin void'(ret_pkt.pop_front()); void'(ret_due.pop_front()); end
    r_tok = r_tok + 125;
    if (r_tok > 9000) r_tok = 9000;
    if (r_tx_valid && r_tx_ready) begin
      int s;
      r_tok -= longint'(r_tx_pkt.len) * 8;
      s = int'(r_tx_pkt.dst_ip - snd_ip(0));
      if (s >= 0 && s < NS) begin
        if (r_tx_pkt.kind == PKT_ACK && int'(r_tx_pkt.psn) == acked[s]) acked[s]++;
        ack_pkt[s].push_back(r_tx_pkt); ack_due[s].push_back(cyc + 540);
      end
    end
  end

  function automatic pkt_t ctrl(int s, int msg);
    pkt_t p;
    p = '0; p.kind = PKT_CTRL; p.op = OP_WRITE;
    p.src_ip = RCV_IP; p.dst_ip = snd_ip(s); p.src_port = 16'd4791; p.dst_port = 16'd4791;
    p.dest_qp = 24'd1; p.src_qp = 24'(10 + s); p.len = 16'(msg);
    return p;
  endfunction

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog: acked %0d %0d %0d", acked[0], acked[1], acked[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit done;
    foreach (acked[i]) begin acked[i] = 0; share[i] = 0; s_tok[i] = 0; end
    r_tok = 0;
    repeat (5) @(posedge clk); rst_n = 1;
    repeat (5) @(posedge clk);
    ctl_pkt[0].push_back(ctrl(0, MSG_LONG));
    while (cyc < X_START) @(posedge clk);
    for (int s = 1; s < NS; s++) ctl_pkt[s].push_back(ctrl(s, MSG_INC));
    done = 0;
    while (!done) begin
      @(posedge clk);
      done = 1;
      for (int s = 1; s < NS; s++) if (acked[s] < MSG_INC) done = 0;
    end
    t_inc_done = cyc;
    while (acked[0] < MSG_LONG) @(posedge clk);
    repeat (200) @(posedge clk);

    begin
      real util;
      longint mn, mx;
      util = real'(bytes_out) / (15.625 * real'(SH_END - SH_START));
      mn = share[1]; mx = share[1];
      for (int s = 1; s < NS; s++) begin
        if (share[s] < mn) mn = share[s];
        if (share[s] > mx) mx = share[s];
      end
      $display("queue peak %0d B, below 10 KB at %0d (%0d us after start); utilisation %f; incast share min %0d max %0d, long %0d; incast done %0d, long flow at 85 %% after %0d us, low bins after %0d, done %0d",
               q_max, t_drain, (t_drain - X_START) / 200, util, mn, mx, share[0], t_inc_done,
               (t_recover - t_inc_done) / 200, bins_low_after, cyc);
      chk(q_max > 20000 && q_max < NS * 28125, "queue bounded by the windows");
      chk(t_drain > 0 && real'(t_drain - X_START) < 2.0 * real'(q_max) / 15.625, "queue drains");
      chk(util >= 0.85, "port utilisation while shared");
      chk(mx > 0 && 2 * mn >= mx, "fair share among incast flows");
      chk(t_recover > 0 && t_recover - t_inc_done <= 20000, "long flow recovers after the incast");
      chk(bins_low_after == 0, "long flow stays at line rate");
    end
    for (int s = 0; s < NS; s++)
      chk(acked[s] == ((s == 0) ? MSG_LONG : MSG_INC), $sformatf("flow of sender %0d delivered", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
