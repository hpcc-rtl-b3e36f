// tb_hpcc_incast16 -- 16-to-1 incast at 100 Gbit/s: the design-choice
// scenario of HPCC.
//
// Sixteen sender NICs and one receiver NIC, all 100 Gbit/s, meet at one
// switch egress port of 100 Gbit/s (4096-packet queue). Every link has a
// 1 us propagation delay (200 clocks of 5 ns):
//   sender NIC s --MAC 100G, 200 clk--> switch port --200 clk--> receiver
//   receiver --ACK, MAC 100G, 400 clk--> sender NIC s
// giving a base RTT of about 4 us. All sixteen flows (1000 packets of 1000
// bytes each) start at the same clock at line rate. The NICs run the
// simulation setting T = 13 us with W_AI = 80 bytes, maxStage = 5 and
// eta = 95 %; as one engine must serve a 100 Gbit/s flow, each has one
// engine of 16 slots (a slot visit every 80 ns, one packet time).
//
// Checks, with the expected behaviour of HPCC:
//   * the start builds a queue (up to 16 x W_init = 2.6 MB) that drains below
//     10 KB within twice the time the port needs to send the peak queue;
//   * afterwards the queue stays short: its 95th percentile, sampled every
//     1 us from 100 us after the drain until the first flow finishes, is
//     within 4 KB (the bound reported for W_AI up to 150 bytes);
//   * the port stays at least 85 % busy in that interval;
//   * fairness: the slowest flow moves at least half the bytes of the
//     fastest in that interval;
//   * every message is delivered completely and in order.
// Topology, speeds, link delay, T and the 4 KB bound follow the published
// scenario; the message size and the queue depth are this test's.
module tb_hpcc_incast16;
  import hpcc_pkg::*;
  localparam int NS  = 16;                 // senders
  localparam int MSG = 1000;               // packets per flow
  localparam int NIC_GBPS = 100;
  localparam int T_NS = 13000;
  localparam int W_INIT = NIC_GBPS * T_NS / 8;
  localparam longint TOK = 500;            // 62.5 bytes per clock, x 8
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
    hpcc_nic #(.NUM_ENGINES(1), .FPE(16), .NIC_GBPS(NIC_GBPS), .T_NS(T_NS)) u_nic (
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
  hpcc_nic #(.NUM_ENGINES(2), .FPE(16), .NIC_GBPS(NIC_GBPS), .T_NS(T_NS)) u_rcv (
    .clk, .rst_n,
    .mac_rx_valid(r_rx_valid), .mac_rx_pkt(r_rx_pkt), .mac_rx_ready(r_rx_ready),
    .mac_tx_valid(r_tx_valid), .mac_tx_pkt(r_tx_pkt), .mac_tx_ready(r_tx_ready),
    .host_upd_valid(r_upd_valid), .host_upd(r_upd), .ev(r_ev)
  );

  logic        sw_in_valid, sw_in_ready, sw_out_valid, sw_out_ready;
  pkt_t        sw_in_pkt, sw_out_pkt;
  logic [31:0] sw_qlen;
  hpcc_switch_egress #(.QUEUE_PKTS(4096), .SPEED(SPD_100G), .SWITCH_ID(12'h00b)) u_sw (
    .clk, .rst_n,
    .in_valid(sw_in_valid), .in_pkt(sw_in_pkt), .in_ready(sw_in_ready),
    .out_valid(sw_out_valid), .out_pkt(sw_out_pkt), .out_ready(sw_out_ready),
    .qlen_bytes(sw_qlen)
  );

  // --------------------------------------------------------------- wires
  pkt_t   fwd_pkt [$];  longint fwd_due [$];          // senders -> switch
  pkt_t   ret_pkt [$];  longint ret_due [$];          // switch -> receiver
  pkt_t   ack_pkt [NS][$];  longint ack_due [NS][$];  // receiver -> sender s
  pkt_t   ctl_pkt [NS][$];                            // control packets to sender s
  longint s_tok [NS];                                 // MAC budget, bytes x 8
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
  longint t_drain = -1;                  // queue first below 10 KB after the peak
  longint t_first_done = -1;             // first flow completely acknowledged
  longint bytes_out = 0;                 // port output in the steady interval
  longint share [NS];                    // per-flow bytes in the steady interval
  int     q_samp [$];                    // queue samples, every 200 clocks
  longint t_start = -1;

  function automatic bit steady();
    return t_drain >= 0 && cyc >= t_drain + 20000 && t_first_done < 0;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (int'(sw_qlen) > q_max) q_max = int'(sw_qlen);
    if (t_drain < 0 && q_max > 100000 && sw_qlen < 10000) t_drain = cyc;
    if (steady() && cyc % 200 == 0) q_samp.push_back(int'(sw_qlen));

    for (int s = 0; s < NS; s++) begin
      s_tok[s] = s_tok[s] + TOK;
      if (s_tok[s] > 16000) s_tok[s] = 16000;
      if (s_tx_valid[s] && s_tx_ready[s]) begin
        s_tok[s] -= longint'(s_tx_pkt[s].len) * 8;
        fwd_pkt.push_back(s_tx_pkt[s]); fwd_due.push_back(cyc + 200);
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
      ret_pkt.push_back(sw_out_pkt); ret_due.push_back(cyc + 200);
      if (steady()) begin
        bytes_out += longint'(sw_out_pkt.len);
        if (s >= 0 && s < NS) share[s] += longint'(sw_out_pkt.len);
      end
    end
    if (r_rx_valid && r_rx_ready) begin void'(ret_pkt.pop_front()); void'(ret_due.pop_front()); end
    r_tok = r_tok + TOK;
    if (r_tok > 16000) r_tok = 16000;
    if (r_tx_valid && r_tx_ready) begin
      int s;
      r_tok -= longint'(r_tx_pkt.len) * 8;
      s = int'(r_tx_pkt.dst_ip - snd_ip(0));
      if (s >= 0 && s < NS) begin
        if (r_tx_pkt.kind == PKT_ACK && int'(r_tx_pkt.psn) == acked[s]) begin
          acked[s]++;
          if (acked[s] == MSG && t_first_done < 0) t_first_done = cyc;
        end
        ack_pkt[s].push_back(r_tx_pkt); ack_due[s].push_back(cyc + 400);
      end
    end
  end

  function automatic pkt_t ctrl(int s);
    pkt_t p;
    p = '0; p.kind = PKT_CTRL; p.op = OP_WRITE;
    p.src_ip = RCV_IP; p.dst_ip = snd_ip(s); p.src_port = 16'd4791; p.dst_port = 16'd4791;
    p.dest_qp = 24'd1; p.src_qp = 24'(1 + s); p.len = 16'(MSG);
    return p;
  endfunction

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("watchdog: acked %0d %0d", acked[0], acked[NS-1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit done;
    foreach (acked[i]) begin acked[i] = 0; share[i] = 0; s_tok[i] = 0; end
    r_tok = 0;
    repeat (5) @(posedge clk); rst_n = 1;
    repeat (5) @(posedge clk);
    for (int s = 0; s < NS; s++) ctl_pkt[s].push_back(ctrl(s));
    t_start = cyc;
    done = 0;
    while (!done) begin
      @(posedge clk);
      done = 1;
      for (int s = 0; s < NS; s++) if (acked[s] < MSG) done = 0;
    end
    repeat (200) @(posedge clk);

    begin
      real util;
      longint mn, mx, dur;
      int q95;
      q_samp.sort();
      q95 = q_samp.size() > 0 ? q_samp[(q_samp.size() * 95) / 100] : -1;
      dur = t_first_done - (t_drain + 20000);
      util = dur > 0 ? real'(bytes_out) / (62.5 * real'(dur)) : 0.0;
      mn = share[0]; mx = share[0];
      for (int s = 0; s < NS; s++) begin
        if (share[s] < mn) mn = share[s];
        if (share[s] > mx) mx = share[s];
      end
      $display("queue peak %0d B, below 10 KB %0d us after start; steady %0d us: q95 %0d B over %0d samples, utilisation %f, share min %0d max %0d; done at %0d",
               q_max, (t_drain - t_start) / 200, dur / 200, q95, q_samp.size(), util, mn, mx, cyc);
      chk(q_max > 100000 && q_max <= NS * W_INIT, "start-up queue bounded by the windows");
      chk(t_drain > 0 && real'(t_drain - t_start) < 2.0 * real'(q_max) / 62.5, "start-up queue drains");
      chk(q_samp.size() >= 100, "steady interval long enough");
      chk(q95 >= 0 && q95 <= 4096, "95th percentile queue within 4 KB");
      chk(util >= 0.85, "port utilisation");
      chk(mx > 0 && 2 * mn >= mx, "fair shares");
    end
    for (int s = 0; s < NS; s++) chk(acked[s] == MSG, $sformatf("flow of sender %0d delivered", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
