// tb_hpcc_nic -- self-checking test of the NIC's HPCC logic with a modelled
// one-hop network.
//
// The NIC sends to itself: its data packets travel 400 clocks, get one INT
// record from the testbench (a 25 Gbit/s link: timestamp, the link's byte
// count and a queue length set by the test phase), come back into the NIC,
// which acknowledges them; the ACKs travel 400 clocks back. One flow carries
// a 600-packet message.
// Phases: no queue (the flow paces at line rate, one packet per 64 clocks);
// a standing 32 KB queue reported from clock 15000 to 30000 (U above 1, so
// HPCC cuts the window and the rate: the packet spacing must at least
// double); no queue again (the rate recovers: additive stages, then
// multiplicative increase from a window near 1.5 KB, about 50 us). The
// spacing is measured in a settled window of each phase. Also checked: data
// packet header taken from the control packet, ACKs carrying the INT record
// back, Update events on the host port, the whole message delivered in
// order.
module tb_hpcc_nic;
  import hpcc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic mac_rx_valid, mac_rx_ready, mac_tx_valid, mac_tx_ready, host_upd_valid;
  pkt_t mac_rx_pkt, mac_tx_pkt;
  cc_upd_t host_upd;
  nic_ev_t ev;
  int checks = 0, failures = 0;
  longint cyc = 0;

  hpcc_nic dut (.*);

  always #2.5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @cycle %0d", what, cyc); end
  endtask

  localparam int MSG = 600;
  pkt_t   dq_pkt [$];  longint dq_due [$];
  pkt_t   ctl_q  [$];
  longint link_bytes = 0;
  int     qlen_units = 0;
  int     acked = 0, n_data = 0, n_upd = 0, hdr_bad = 0, ack_int_bad = 0;
  longint t_first [3], t_last [3];
  int     n_phase [3];
  longint m_start [3] = '{8000, 22500, 45000};
  longint m_end   [3] = '{15000, 30000, 58000};

  function automatic int phase_of(longint c);
    return (c < 15000) ? 0 : (c < 30000) ? 1 : 2;
  endfunction

  assign mac_tx_ready = 1'b1;

  always_comb begin
    if (ctl_q.size() > 0) begin
      mac_rx_valid = 1'b1; mac_rx_pkt = ctl_q[0];
    end else begin
      mac_rx_valid = dq_pkt.size() > 0 && dq_due[0] <= cyc;
      mac_rx_pkt   = dq_pkt.size() > 0 ? dq_pkt[0] : '0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (host_upd_valid) n_upd++;
    if (mac_rx_valid && mac_rx_ready) begin
      if (ctl_q.size() > 0) void'(ctl_q.pop_front());
      else begin void'(dq_pkt.pop_front()); void'(dq_due.pop_front()); end
    end
    if (mac_tx_valid && mac_tx_ready) begin
      pkt_t p;
      p = mac_tx_pkt;
      if (p.kind == PKT_DATA) begin
        int ph;
        ph = phase_of(cyc);
        if (p.dst_ip != 32'h0a000007 || p.dest_qp != 24'd40 || p.src_qp != 24'd5 || p.op != OP_WRITE) hdr_bad++;
        // spacing is measured in a settled window of each phase
        if (cyc >= m_start[ph] && cyc < m_end[ph]) begin
          if (n_phase[ph] == 0) t_first[ph] = cyc;
          t_last[ph] = cyc;
          n_phase[ph]++;
        end
        n_data++;
        // one hop: 25G link
        link_bytes += 1000;
        p.intr.nhop = 4'd1; p.intr.path_id = 12'h00b;
        p.intr.hop[0].b = SPD_25G;
        p.intr.hop[0].ts = 24'(cyc * 5 + 2000);
        p.intr.hop[0].tx_bytes = 20'(link_bytes / 128);
        p.intr.hop[0].qlen = 16'((ph == 1) ? 400 : 0);
        // the packet arrives at the receiving QP 40 of the same NIC
        p.dest_qp = 24'd40; p.src_qp = 24'd5;
        dq_pkt.push_back(p); dq_due.push_back(cyc + 400);
      end else if (p.kind == PKT_ACK) begin
        if (p.intr.nhop != 4'd1 || p.intr.path_id != 12'h00b) ack_int_bad++;
        if (int'(p.psn) == acked) acked++;
        // ACK for local flow 5
        p.dest_qp = 24'd5;
        dq_pkt.push_back(p); dq_due.push_back(cyc + 400);
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    pkt_t c;
    foreach (n_phase[i]) n_phase[i] = 0;
    repeat (5) @(posedge clk); rst_n = 1; repeat (3) @(posedge clk);
    c = '0; c.kind = PKT_CTRL; c.op = OP_WRITE; c.dest_qp = 24'd5; c.src_qp = 24'd40;
    c.src_ip = 32'h0a000007; c.dst_ip = 32'h0a000001; c.src_port = 16'd4791; c.dst_port = 16'd4791;
    c.len = 16'(MSG);
    ctl_q.push_back(c);
    while (acked < MSG) @(posedge clk);
    repeat (100) @(posedge clk);
    begin
      real s0, s1, s2;
      s0 = real'(t_last[0] - t_first[0]) / real'(n_phase[0] - 1);
      s1 = real'(t_last[1] - t_first[1]) / real'(n_phase[1] - 1);
      s2 = real'(t_last[2] - t_first[2]) / real'(n_phase[2] - 1);
      $display("packet spacing: %f / %f / %f clocks, packets %0d %0d %0d, updates %0d",
               s0, s1, s2, n_phase[0], n_phase[1], n_phase[2], n_upd);
      chk(s0 > 60.0 && s0 < 70.0, "line rate without queue");
      chk(s1 > 2.0 * s0, "queue halves the rate at least");
      chk(s2 < 1.3 * s0, "rate recovers");
    end
    chk(acked == MSG && n_data >= MSG, "whole message delivered in order");
    chk(hdr_bad == 0, "data header from control packet");
    chk(ack_int_bad == 0, "ACK carries the INT record");
    chk(n_upd > MSG / 2, "Update events on the host port");
    chk(ev.oos == 1'b0, "no loss");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
