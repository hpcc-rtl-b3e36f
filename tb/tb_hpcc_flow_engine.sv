// tb_hpcc_flow_engine -- self-checking test of one flow-scheduler engine.
//
// Default engine (50 slots, 1000-byte packets, W_init 28125 bytes, line rate
// 15.625 bytes per clock). Checks:
//   * pacing: a new flow sends one packet per 64 clocks on average
//     (1000 / 15.625), the rate HPCC's credit scheme gives;
//   * window: without ACKs the flow stops after 29 packets (inflight below
//     28125 bytes) and reports window blocking; ACKs reopen it; the message
//     length ends it;
//   * Update events: a quarter rate gives one packet per 256 clocks and a
//     2500-byte window three packets in flight;
//   * NAK: sending restarts at the NAK's PSN; a blocked PktSend is retried;
//   * remove stops the flow.
module tb_hpcc_flow_engine;
  import hpcc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ctl_valid, ctl_remove, ack_valid, ack_nak, upd_valid, send_valid, send_ready;
  logic [5:0] ctl_slot, ack_slot, upd_slot, send_slot, rd_slot;
  logic [PSN_W-1:0] ctl_total, ack_psn, send_psn, rd_snd_nxt;
  logic [WIN_W-1:0] upd_win;
  logic [RATE_W-1:0] upd_rate;
  logic ev_win_block, ev_credit_wait;
  int checks = 0, failures = 0;
  longint cyc = 0;

  hpcc_flow_engine dut (.*);

  always #2.5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // send log per slot
  int     n_sent [64];
  longint t_sent [64][$];
  int     p_sent [64][$];
  int     win_blocks = 0;
  always @(posedge clk) if (rst_n) begin
    if (send_valid && send_ready) begin
      n_sent[send_slot]++;
      t_sent[send_slot].push_back(cyc);
      p_sent[send_slot].push_back(int'(send_psn));
    end
    if (ev_win_block) win_blocks++;
  end

  task automatic cmd_create(int slot, int total);
    ctl_valid = 1; ctl_remove = 0; ctl_slot = 6'(slot); ctl_total = 24'(total);
    @(posedge clk); #0.1; ctl_valid = 0;
  endtask
  task automatic cmd_ack(int slot, int psn, logic is_nak);
    ack_valid = 1; ack_nak = is_nak; ack_slot = 6'(slot); ack_psn = 24'(psn);
    @(posedge clk); #0.1; ack_valid = 0;
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ctl_valid = 0; ctl_remove = 0; ack_valid = 0; ack_nak = 0; upd_valid = 0; send_ready = 1;
    ctl_slot = 0; ack_slot = 0; upd_slot = 0; rd_slot = 0; ctl_total = 0; ack_psn = 0;
    upd_win = 0; upd_rate = 0;
    foreach (n_sent[i]) n_sent[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk); #0.1;

    // ---- pacing and window
    cmd_create(3, 40);
    repeat (4000) @(posedge clk); #0.1;
    chk(n_sent[3] == 29, $sformatf("window stops the flow at 29 packets (%0d)", n_sent[3]));
    begin
      real avg;
      avg = real'(t_sent[3][19] - t_sent[3][0]) / 19.0;
      chk(avg > 61.0 && avg < 67.0, $sformatf("line-rate pacing 64 clk/pkt (%f)", avg));
    end
    chk(win_blocks > 0, "window blocking reported");
    rd_slot = 6'd3; #0.1;
    chk(rd_snd_nxt == 24'd29, "snd_nxt read port");
    cmd_ack(3, 28, 0);
    repeat (1500) @(posedge clk); #0.1;
    chk(n_sent[3] == 40, $sformatf("message length ends the flow (%0d)", n_sent[3]));
    for (int i = 0; i < 40; i++) chk(p_sent[3][i] == i, "psn order");

    // ---- Update: quarter rate, 2500-byte window
    cmd_create(7, 100);
    upd_valid = 1; upd_slot = 6'd7; upd_win = 24'd2500; upd_rate = 24'd256000;
    @(posedge clk); #0.1; upd_valid = 0;
    repeat (2000) @(posedge clk); #0.1;
    chk(n_sent[7] == 3, $sformatf("2500-byte window: 3 in flight (%0d)", n_sent[7]));
    chk(t_sent[7][2] - t_sent[7][1] >= 200 && t_sent[7][2] - t_sent[7][1] <= 300,
        $sformatf("quarter rate spacing ~256 (%0d)", t_sent[7][2] - t_sent[7][1]));
    // ---- NAK: go back to psn 1
    cmd_ack(7, 1, 1);
    repeat (1200) @(posedge clk); #0.1;
    chk(n_sent[7] == 6 && p_sent[7][3] == 1 && p_sent[7][4] == 2 && p_sent[7][5] == 3,
        $sformatf("go-back-N resend from psn 1 (%0d sent)", n_sent[7]));
    // ---- blocked PktSend is retried
    cmd_ack(7, 3, 0);
    send_ready = 0;
    repeat (600) @(posedge clk); #0.1;
    chk(n_sent[7] == 6, "nothing sent while blocked");
    send_ready = 1;
    repeat (600) @(posedge clk); #0.1;
    chk(n_sent[7] > 6 && p_sent[7][6] == 4, "sends resume after block");
    // ---- remove
    ctl_valid = 1; ctl_remove = 1; ctl_slot = 6'd7;
    @(posedge clk); #0.1; ctl_valid = 0;
    begin
      int n_before;
      n_before = n_sent[7];
      repeat (2000) @(posedge clk); #0.1;
      chk(n_sent[7] == n_before, "removed flow is silent");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
