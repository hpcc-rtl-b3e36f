// tb_hpcc_flow_sched -- self-checking test of the multi-engine flow scheduler.
//
// Default size (6 engines x 50 flows). Three flows are created in engines 0,
// 1 and 5; flows 10 and 60 occupy the same slot of two engines and so ask to
// send in the same clock, which the round-robin arbiter must share fairly.
// Checks: global flow numbers and PSN order of the PktSend events, the CC
// init on create, ACKs forwarded to the CC with the flow's snd_nxt (and held
// while the CC is busy), NAKs not forwarded, Update events reaching the right
// engine (a tiny window stops flow 299), remove.
module tb_hpcc_flow_sched;
  import hpcc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic note_valid, note_ready, ctl_valid, ctl_ready, cc_ack_valid, cc_ack_ready;
  logic cc_init_valid, cc_init_ready, upd_valid, send_valid, send_ready;
  logic ev_win_block, ev_credit_wait, ev_send_conflict;
  ack_note_t note;
  flow_ctrl_t ctl;
  cc_ack_t cc_ack;
  logic [FLOW_W-1:0] cc_init_flow;
  cc_upd_t upd;
  pkt_send_t send;
  int checks = 0, failures = 0;

  hpcc_flow_sched dut (.*);

  always #2.5 clk = ~clk;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  int n_sent [300];
  int bad_psn = 0, conflicts = 0, inits = 0, n_init_flow = -1;
  always @(posedge clk) if (rst_n) begin
    if (send_valid && send_ready) begin
      if (int'(send.psn) != n_sent[send.flow]) bad_psn++;
      n_sent[send.flow]++;
    end
    if (ev_send_conflict) conflicts++;
    if (cc_init_valid && cc_init_ready) begin inits++; n_init_flow = int'(cc_init_flow); end
  end

  task automatic create(int f, int total);
    ctl_valid = 1; ctl = '0; ctl.flow = 16'(f); ctl.total_pkts = 24'(total); ctl.op = OP_WRITE;
    @(posedge clk); #0.1; ctl_valid = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    note_valid = 0; ctl_valid = 0; upd_valid = 0; send_ready = 1; cc_ack_ready = 1; cc_init_ready = 1;
    note = '0; ctl = '0; upd = '0;
    foreach (n_sent[i]) n_sent[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk); #0.1;
    create(10, 1000);
    chk(inits == 1 && n_init_flow == 10, "CC init on create");
    create(60, 1000);
    create(299, 1000);
    // CC busy holds a create
    cc_init_ready = 0; ctl_valid = 1; ctl.flow = 16'd100; #0.1;
    chk(!ctl_ready, "create waits for CC");
    ctl_valid = 0; cc_init_ready = 1;
    repeat (1200) @(posedge clk); #0.1;
    chk(n_sent[10] > 5 && n_sent[60] > 5 && n_sent[299] > 5, "three engines send");
    chk(n_sent[10] - n_sent[60] <= 2 && n_sent[60] - n_sent[10] <= 2,
        $sformatf("arbiter shares a conflict fairly (%0d/%0d)", n_sent[10], n_sent[60]));
    chk(conflicts > 0, "engines met at the arbiter");
    chk(bad_psn == 0, "PSN order per flow");
    for (int f = 0; f < 300; f++)
      if (f != 10 && f != 60 && f != 299) chk(n_sent[f] == 0, "only created flows send");
    // ACK for flow 60 forwarded with snd_nxt
    note_valid = 1; note = '0; note.flow = 16'd60; note.psn = 24'd0; note.intr.nhop = 4'd1;
    #0.1;
    chk(cc_ack_valid && cc_ack.flow == 16'd60 && cc_ack.seq == 24'd0 &&
        int'(cc_ack.snd_nxt) == n_sent[60] && cc_ack.intr.nhop == 4'd1, "ACK to CC with snd_nxt");
    cc_ack_ready = 0; #0.1;
    chk(!note_ready, "ACK waits for CC");
    cc_ack_ready = 1;
    @(posedge clk); #0.1;
    // NAK for flow 60 psn 1: not forwarded, resend from 1
    note.nak = 1; note.psn = 24'd1; #0.1;
    chk(!cc_ack_valid && note_ready, "NAK not sent to CC");
    @(posedge clk); #0.1; note_valid = 0;
    begin
      int n60;
      n60 = n_sent[60];
      n_sent[60] = 1;   // the engine continues at psn 1
      repeat (300) @(posedge clk); #0.1;
      chk(bad_psn == 0 && n_sent[60] > 1, "go-back-N continues at psn 1");
      if (n60 < 2) chk(0, "flow 60 had sent");
    end
    // Update: window of 1 byte for flow 299
    upd_valid = 1; upd.flow = 16'd299; upd.win = 24'd1; upd.rate = 24'd1024000;
    @(posedge clk); #0.1; upd_valid = 0;
    repeat (200) @(posedge clk); #0.1;
    begin
      int n299;
      n299 = n_sent[299];
      repeat (1000) @(posedge clk); #0.1;
      chk(n_sent[299] == n299, "tiny window stops flow 299");
    end
    // remove flow 10
    ctl_valid = 1; ctl = '0; ctl.flow = 16'd10; ctl.remove = 1;
    @(posedge clk); #0.1; ctl_valid = 0;
    begin
      int n10;
      n10 = n_sent[10];
      repeat (1000) @(posedge clk); #0.1;
      chk(n_sent[10] == n10 && n_sent[60] > 20, "removed flow silent, others go on");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
