// tb_hpcc_top -- end-to-end test of HPCC: NIC, switch egress port, and the
// control loop between them, at the default parameters.
//
// Network built around the top (all timing in 5 ns clocks):
//   NIC MAC tx (limited to 25 Gbit/s) --data, 300 clk--> switch port (100G)
//   switch port --300 clk--> NIC MAC rx    (data back to the same NIC, which
//                                           is also the receiver)
//   NIC MAC tx --ACK/NAK, 600 clk--> NIC MAC rx
// The base RTT is about 6 us, below T = 9 us. Four flows are created by
// control packets (two of them in the same slot of different engines). From
// clock 20000 to 60000 another sender's traffic (85 Gbit/s) joins the switch
// port, so the port is overloaded and its queue and tx rate show up in the
// INT records. One data packet is dropped once to force a NAK and
// go-back-N. When every message is acknowledged the flows are removed.
//
// Checks: every message is delivered completely and in order; windows fall
// well below W_init during the overload and grow again after it; the queue
// built at the onset of the overload (the flows start with full windows,
// which do not bind while the shared 25G MAC limits each flow) drains: its
// mean is below 16 KB over the last 100 us of overload and below 4 KB over
// the last 50 us; removed flows stay silent; every mechanism of the design
// happened at least once (multiplicative and additive steps, Wc sync, record
// reset, window block, pacing wait, engine conflict, out-of-sequence packet,
// go-back-N, queueing, flow create and remove).
module tb_hpcc_top;
  import hpcc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic nic_rx_valid, nic_rx_ready, nic_tx_valid, nic_tx_ready, nic_upd_valid;
  pkt_t nic_rx_pkt, nic_tx_pkt, sw_in_pkt, sw_out_pkt;
  cc_upd_t nic_upd;
  nic_ev_t nic_ev;
  logic sw_in_valid, sw_in_ready, sw_out_valid, sw_out_ready;
  logic [31:0] sw_qlen_bytes;
  int checks = 0, failures = 0;
  longint cyc = 0;

  hpcc_top dut (.*);

  always #2.5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @cycle %0d", what, cyc); end
  endtask

  localparam int NF = 4;
  localparam int MSG = 400;              // packets per message
  localparam int FLOWS [NF] = '{10, 60, 120, 299};
  localparam int RQP [NF]   = '{200, 201, 202, 203};
  localparam longint X_START = 20000, X_END = 60000;
  localparam logic [31:0] NIC_IP = 32'h0a000001;

  // ------------------------------------------------------------ delay lines
  pkt_t   d_fwd_pkt [$];  longint d_fwd_due [$];   // NIC -> switch
  pkt_t   d_ret_pkt [$];  longint d_ret_due [$];   // switch -> NIC
  pkt_t   d_ack_pkt [$];  longint d_ack_due [$];   // NIC -> NIC (ACK/NAK)
  pkt_t   d_ctl_pkt [$];                           // control packets to NIC

  // ---------------------------------------------------------- MAC 25 Gbit/s
  longint mac_tok = 0;   // bytes x 8; 15.625 B/clk = 125 per clock
  assign nic_tx_ready = mac_tok >= longint'(nic_tx_pkt.len) * 8;

  // ------------------------------------------------------------- counters
  int n_md = 0, n_ai = 0, n_wcu = 0, n_path = 0, n_wblk = 0, n_cwait = 0;
  int n_conf = 0, n_gbn = 0, n_oos = 0, n_create = 0, n_remove = 0, n_queue = 0;
  int n_upd = 0, x_sent = 0, x_drop = 0;
  int acked [NF];         // highest in-order PSN acknowledged by the receiver + 1
  int data_after_remove = 0;
  bit dropped = 0, removed = 0;
  int min_win_x = 1 << 30, max_win_after = 0, last_win_x = 0;
  longint q_sum = 0, q_n = 0;
  int q_max = 0;
  longint q_late_sum = 0, q_late_n = 0;

  function automatic int fidx(int f);
    for (int i = 0; i < NF; i++) if (FLOWS[i] == f) return i;
    return -1;
  endfunction
  function automatic int ridx(int q);
    for (int i = 0; i < NF; i++) if (RQP[i] == q) return i;
    return -1;
  endfunction

  always @(posedge clk) if (rst_n) begin
    // events
    if (nic_ev.md) n_md++;
    if (nic_ev.ai) n_ai++;
    if (nic_ev.wc_update) n_wcu++;
    if (nic_ev.path_reset) n_path++;
    if (nic_ev.win_block) n_wblk++;
    if (nic_ev.credit_wait) n_cwait++;
    if (nic_ev.send_conflict) n_conf++;
    if (nic_ev.gbn) n_gbn++;
    if (nic_ev.oos) n_oos++;
    if (sw_qlen_bytes > 0) n_queue++;
    if (sw_qlen_bytes > 32'(q_max)) q_max = int'(sw_qlen_bytes);
    if (cyc > X_END - 10000 && cyc < X_END) begin q_late_sum += sw_qlen_bytes; q_late_n++; end
    if (cyc > X_START + 20000 && cyc < X_END) begin q_sum += sw_qlen_bytes; q_n++; end
    if (nic_upd_valid) begin
      n_upd++;
      if (cyc > X_START + 10000 && cyc < X_END) begin
        if (int'(nic_upd.win) < min_win_x) min_win_x = int'(nic_upd.win);
        last_win_x = int'(nic_upd.win);
      end
      if (cyc > X_END + 30000 && int'(nic_upd.win) > max_win_after) max_win_after = int'(nic_upd.win);
    end

    // MAC budget
    mac_tok = mac_tok + 125;
    if (mac_tok > 9000) mac_tok = 9000;

    // NIC transmit side
    if (nic_tx_valid && nic_tx_ready) begin
      mac_tok -= longint'(nic_tx_pkt.len) * 8;
      if (nic_tx_pkt.kind == PKT_DATA) begin
        if (removed) data_after_remove++;
        // drop flow 60's psn 50 once
        if (!dropped && nic_tx_pkt.src_qp == 24'd60 && nic_tx_pkt.psn == 24'd50) dropped = 1;
        else begin d_fwd_pkt.push_back(nic_tx_pkt); d_fwd_due.push_back(cyc + 300); end
      end else begin
        int r;
        r = ridx(int'(nic_tx_pkt.src_qp));
        if (nic_tx_pkt.kind == PKT_ACK && r >= 0 && int'(nic_tx_pkt.psn) == acked[r]) acked[r]++;
        d_ack_pkt.push_back(nic_tx_pkt); d_ack_due.push_back(cyc + 600);
      end
    end

    // switch input: our data, else cross traffic
    if (sw_in_valid && sw_in_ready) begin
      if (sw_in_pkt.dest_qp == 24'hffffff) x_sent++;
      else begin void'(d_fwd_pkt.pop_front()); void'(d_fwd_due.pop_front()); end
    end else if (sw_in_valid && sw_in_pkt.dest_qp == 24'hffffff) x_drop++;

    // switch output
    if (sw_out_valid && sw_out_ready && sw_out_pkt.dest_qp != 24'hffffff) begin
      d_ret_pkt.push_back(sw_out_pkt); d_ret_due.push_back(cyc + 300);
    end

    // NIC receive side
    if (nic_rx_valid && nic_rx_ready) begin
      if (d_ctl_pkt.size() > 0 && nic_rx_pkt.kind == PKT_CTRL) begin
        if (nic_rx_pkt.op == OP_REMOVE) n_remove++; else n_create++;
        void'(d_ctl_pkt.pop_front());
      end else if (d_ack_pkt.size() > 0 && d_ack_due[0] <= cyc && nic_rx_pkt == d_ack_pkt[0]) begin
        void'(d_ack_pkt.pop_front()); void'(d_ack_due.pop_front());
      end else begin
        void'(d_ret_pkt.pop_front()); void'(d_ret_due.pop_front());
      end
    end
  end

  // cross traffic: 85 Gbit/s = 53.125 bytes per clock, 1000-byte packets
  logic x_on;
  assign x_on = (cyc >= X_START && cyc < X_END) && ((cyc * 53125) % 1000000 < 53125);
  pkt_t x_pkt;
  always_comb begin
    x_pkt = '0; x_pkt.kind = PKT_DATA; x_pkt.len = 16'd1000; x_pkt.dest_qp = 24'hffffff;
  end

  always_comb begin
    if (x_on) begin
      sw_in_valid = 1'b1; sw_in_pkt = x_pkt;
    end else begin
      sw_in_valid = d_fwd_pkt.size() > 0 && d_fwd_due[0] <= cyc;
      sw_in_pkt   = d_fwd_pkt.size() > 0 ? d_fwd_pkt[0] : '0;
    end
    sw_out_ready = 1'b1;
    // NIC rx: control first, then ACKs, then returning data
    if (d_ctl_pkt.size() > 0) begin
      nic_rx_valid = 1'b1; nic_rx_pkt = d_ctl_pkt[0];
    end else if (d_ack_pkt.size() > 0 && d_ack_due[0] <= cyc) begin
      nic_rx_valid = 1'b1; nic_rx_pkt = d_ack_pkt[0];
    end else begin
      nic_rx_valid = d_ret_pkt.size() > 0 && d_ret_due[0] <= cyc;
      nic_rx_pkt   = d_ret_pkt.size() > 0 ? d_ret_pkt[0] : '0;
    end
  end

  function automatic pkt_t ctrl(int f, int rq, rdma_op_e op);
    pkt_t p;
    p = '0; p.kind = PKT_CTRL; p.op = op;
    p.src_ip = NIC_IP; p.dst_ip = NIC_IP; p.src_port = 16'd4791; p.dst_port = 16'd4791;
    p.dest_qp = 24'(f); p.src_qp = 24'(rq); p.len = 16'(MSG);
    return p;
  endfunction

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog: acked %0d %0d %0d %0d", acked[0], acked[1], acked[2], acked[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit done;
    foreach (acked[i]) acked[i] = 0;
    repeat (5) @(posedge clk); rst_n = 1;
    repeat (5) @(posedge clk);
    for (int i = 0; i < NF; i++) d_ctl_pkt.push_back(ctrl(FLOWS[i], RQP[i], (i % 2) ? OP_READ : OP_WRITE));
    // the receiving QPs get a control packet too, which resets their PSN state
    done = 0;
    while (!done) begin
      @(posedge clk);
      done = 1;
      for (int i = 0; i < NF; i++) if (acked[i] < MSG) done = 0;
    end
    $display("all messages delivered at cycle %0d", cyc);
    repeat (2000) @(posedge clk);
    for (int i = 0; i < NF; i++) d_ctl_pkt.push_back(ctrl(FLOWS[i], RQP[i], OP_REMOVE));
    repeat (100) @(posedge clk);
    removed = 1;
    repeat (3000) @(posedge clk);

    for (int i = 0; i < NF; i++) chk(acked[i] == MSG, $sformatf("flow %0d delivered %0d of %0d", FLOWS[i], acked[i], MSG));
    chk(data_after_remove == 0, "removed flows silent");
    chk(min_win_x < 28125 / 4, $sformatf("overload shrinks windows (min %0d)", min_win_x));
    chk(max_win_after > last_win_x, $sformatf("windows grow after overload (%0d -> %0d)", last_win_x, max_win_after));
    chk(q_max > 0 && q_late_n > 0 && q_late_sum / q_late_n < 4000,
        $sformatf("queue near zero late in the overload: mean %0d B (peak %0d B)", q_late_n > 0 ? q_late_sum / q_late_n : 0, q_max));
    chk(q_n > 0 && q_sum / q_n < 16000, $sformatf("mean queue under overload after reaction %0d B", q_n > 0 ? q_sum / q_n : 0));
    $display("mechanisms: md=%0d ai=%0d wc_sync=%0d rec_reset=%0d win_block=%0d credit_wait=%0d conflict=%0d oos=%0d gbn=%0d queue=%0d create=%0d remove=%0d updates=%0d cross=%0d/%0d dropped",
             n_md, n_ai, n_wcu, n_path, n_wblk, n_cwait, n_conf, n_oos, n_gbn, n_queue, n_create, n_remove, n_upd, x_sent, x_drop);
    chk(n_md > 0, "multiplicative step happened");
    chk(n_ai > 0, "additive step happened");
    chk(n_wcu > 0, "Wc synchronisation happened");
    chk(n_path > 0, "record reset happened");
    chk(n_wblk > 0, "window block happened");
    chk(n_cwait > 0, "pacing wait happened");
    chk(n_conf > 0, "engine conflict happened");
    chk(n_oos > 0, "out-of-sequence packet happened");
    chk(n_gbn > 0, "go-back-N happened");
    chk(n_queue > 0, "switch queueing happened");
    chk(n_create == NF && n_remove == NF, "flows created and removed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
