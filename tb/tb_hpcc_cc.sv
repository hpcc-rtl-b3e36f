// tb_hpcc_cc -- self-checking test of the HPCC congestion-control module.
//
// A floating-point model of the sender algorithm (MeasureInflight with the
// EWMA, ComputeWind with the reference window, incStage and lastUpdateSeq)
// runs next to the module with the default parameters (T = 9 us, 25 Gbit/s
// NIC, eta = 0.95, maxStage = 5, W_AI = 80 bytes). For every ACK the test
// compares the window (within 1.5 %), the pacing rate R = W/T, the branch
// taken (multiplicative or additive) and whether Wc was synchronised.
// Phases: first ACK seeds the records; a congested 25G hop (deep queue, full
// tx rate) makes the window shrink, several ACKs of one round trip must give
// windows computed from the same Wc (no overreaction); light load then gives
// maxStage additive steps followed by a multiplicative increase; a pathID
// change replaces the records without an update. The latency from ACK
// acceptance to the Update is checked to be nHop + 3 clocks.
module tb_hpcc_cc;
  import hpcc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic init_valid, init_ready, ack_valid, ack_ready, upd_valid;
  logic [FLOW_W-1:0] init_flow;
  cc_ack_t ack;
  cc_upd_t upd;
  logic ev_md, ev_ai, ev_wc_update, ev_path_reset;
  int checks = 0, failures = 0;
  longint cyc = 0;

  hpcc_cc dut (.*);

  always #2.5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // ------------------------------------------------------------ model
  localparam real T = 9000.0, ETA = 0.95, WAI = 80.0, WINIT = 28125.0;
  real m_u = 0.0, m_wc = WINIT;
  int  m_stage = 0, m_last = 0;
  int_hop_t m_l [MAX_HOPS];
  real m_w;
  logic m_md, m_wcu;

  function automatic real gbps_of(logic [3:0] b);
    return real'(speed_gbps(b));
  endfunction

  task automatic model_ack(int nh, int_hop_t h [MAX_HOPS], int seq, int snd_nxt);
    real u, tau;
    u = 0.0; tau = 0.0;
    for (int i = 0; i < nh; i++) begin
      real dts, dby, q, bbyte, up;
      dts   = real'(24'(h[i].ts - m_l[i].ts));
      dby   = real'(20'(h[i].tx_bytes - m_l[i].tx_bytes)) * 128.0;
      q     = real'((h[i].qlen < m_l[i].qlen) ? h[i].qlen : m_l[i].qlen) * 80.0;
      bbyte = gbps_of(h[i].b) / 8.0;
      up    = q / (bbyte * T) + (dby / dts) / bbyte;
      if (up > u) begin u = up; tau = dts; end
    end
    if (tau > T) tau = T;
    m_u = (1.0 - tau / T) * m_u + (tau / T) * u;
    m_md  = (m_u >= ETA) || (m_stage >= 5);
    m_wcu = seq > m_last;
    if (m_md) m_w = m_wc / (m_u / ETA) + WAI;
    else      m_w = m_wc + WAI;
    if (m_w > WINIT) m_w = WINIT;
    if (m_wcu) begin
      m_stage = m_md ? 0 : m_stage + 1;
      m_wc = m_w;
      m_last = snd_nxt;
    end
    for (int i = 0; i < nh; i++) m_l[i] = h[i];
  endtask

  // ------------------------------------------------------------ driver
  int_hop_t hops [MAX_HOPS];
  logic [11:0] path = 12'h123;
  int nhop = 2;

  // send one ACK, wait for the result; returns 1 if an update came
  task automatic send_ack(int seq, int snd_nxt, bit expect_upd, bit check_branch);
    longint t0;
    bit got;
    ack_valid = 1;
    ack = '0; ack.flow = 16'd3; ack.seq = 24'(seq); ack.snd_nxt = 24'(snd_nxt);
    ack.intr.nhop = 4'(nhop); ack.intr.path_id = path;
    for (int i = 0; i < MAX_HOPS; i++) ack.intr.hop[i] = hops[i];
    @(posedge clk);
    while (!ack_ready) @(posedge clk);
    #0.1; ack_valid = 0;
    t0 = cyc;
    got = 0;
    for (int k = 0; k < 20 && !got; k++) begin
      @(posedge clk); #0.1;
      if (upd_valid) begin
        got = 1;
        if (expect_upd) begin
          real rel, r_exp;
          model_ack(nhop, hops, seq, snd_nxt);
          rel = (real'(upd.win) - m_w) / m_w;
          chk(rel < 0.015 && rel > -0.015,
              $sformatf("seq %0d: W=%0d model %f (U model %f)", seq, upd.win, m_w, m_u));
          r_exp = real'(upd.win) * 5.0 / T * 65536.0;
          chk(real'(upd.rate) > r_exp * 0.99 - 1 && real'(upd.rate) < r_exp * 1.01 + 1, "R = W/T");
          chk(ev_wc_update == m_wcu, $sformatf("seq %0d: Wc sync %0d model %0d", seq, ev_wc_update, m_wcu));
          if (check_branch)
            chk(ev_md == m_md && ev_ai == !m_md, $sformatf("seq %0d: branch md=%0d model %0d", seq, ev_md, m_md));
          chk(cyc - t0 == longint'(nhop + 3), $sformatf("latency %0d", cyc - t0));
          chk(upd.flow == 16'd3, "flow id");
        end
      end
      if (ev_path_reset) begin
        for (int i = 0; i < MAX_HOPS; i++) m_l[i] = hops[i];
      end
    end
    if (!expect_upd) chk(!got, "no update expected");
    else             chk(got, "update expected");
  endtask

  task automatic advance(int dt_ns, int hop0_units, int hop0_q, int hop1_units, int hop1_q);
    hops[0].ts += 24'(dt_ns); hops[0].tx_bytes += 20'(hop0_units); hops[0].qlen = 16'(hop0_q);
    hops[1].ts += 24'(dt_ns); hops[1].tx_bytes += 20'(hop1_units); hops[1].qlen = 16'(hop1_q);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int md_seen = 0, ai_seen = 0;
  always @(posedge clk) begin
    if (ev_md) md_seen++;
    if (ev_ai) ai_seen++;
  end

  initial begin
    init_valid = 0; ack_valid = 0; ack = '0; init_flow = 0;
    for (int i = 0; i < MAX_HOPS; i++) hops[i] = '0;
    hops[0].b = SPD_25G;  hops[0].ts = 24'd1000; hops[0].tx_bytes = 20'd5000; hops[0].qlen = 16'd0;
    hops[1].b = SPD_100G; hops[1].ts = 24'd1007; hops[1].tx_bytes = 20'd9000; hops[1].qlen = 16'd0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk); #0.1;
    init_valid = 1; init_flow = 16'd3;
    @(posedge clk); #0.1; init_valid = 0;

    // first ACK: records only
    send_ack(0, 20, 0, 0);
    // congestion at hop 0: deep queue, 24 units (3072 B) per 1000 ns at 25G
    advance(1000, 24, 200, 20, 0);
    send_ack(1, 25, 1, 1);                 // Wc sync, lastUpdateSeq = 25
    for (int k = 2; k <= 6; k++) begin     // same round trip: no overreaction
      advance(1000, 24, 220, 20, 0);
      send_ack(k, 25 + k, 1, 1);
    end
    advance(1000, 24, 220, 20, 0);
    send_ack(26, 40, 1, 1);                // next round trip
    // light load: queue gone, 10 % tx rate; long gaps so the EWMA follows
    for (int k = 0; k < 9; k++) begin
      advance(3000, 7, 0, 10, 0);
      send_ack(41 + k, 42 + k, 1, 1);
    end
    chk(md_seen > 0 && ai_seen >= 5, $sformatf("both branches taken (md %0d ai %0d)", md_seen, ai_seen));
    // path change: records replaced, no update
    path = 12'h456;
    advance(1000, 5, 0, 5, 0);
    send_ack(60, 61, 0, 0);
    advance(1000, 5, 0, 5, 0);
    send_ack(61, 62, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
