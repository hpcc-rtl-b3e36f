// tb_hpcc_rx_pipe -- self-checking test of the NIC receive pipe.
//
// Feeds packet descriptors one at a time and checks the event each raises:
// in-sequence data -> ACK PktRecv; a gap -> one NAK with the expected PSN,
// later out-of-sequence packets dropped; duplicate -> ACK; ACK and NAK ->
// scheduler notify (NAK also to the TX pipe); control -> create/remove with
// the peer taken from the packet; back-pressure holds the packet.
module tb_hpcc_rx_pipe;
  import hpcc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rx_valid, rx_ready, recv_valid, recv_ready, nak_valid;
  logic note_valid, note_ready, ctl_valid, ctl_ready, ev_oos;
  pkt_t rx_pkt;
  pkt_recv_t recv;
  nak_note_t nak;
  ack_note_t note;
  flow_ctrl_t ctl;
  int checks = 0, failures = 0;

  hpcc_rx_pipe #(.NUM_FLOWS(16)) dut (.*);

  always #2.5 clk = ~clk;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  function automatic pkt_t mk(pkt_kind_e k, int qp, int psn);
    pkt_t p;
    p = '0; p.kind = k; p.dest_qp = 24'(qp); p.src_qp = 24'(qp + 100);
    p.psn = 24'(psn); p.src_ip = 32'h0a000001; p.dst_ip = 32'h0a000002;
    p.src_port = 16'd1111; p.dst_port = 16'd4791; p.len = 16'd1000;
    p.intr.nhop = 4'd1; p.intr.path_id = 12'h5a5;
    return p;
  endfunction

  // apply one packet combinationally, sample events, then clock it in
  task automatic put(pkt_t p);
    rx_valid = 1; rx_pkt = p; #1;
  endtask
  task automatic take();
    @(posedge clk); #0.1; rx_valid = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rx_valid = 0; rx_pkt = '0; recv_ready = 1; note_ready = 1; ctl_ready = 1;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk); #0.1;
    // in sequence: psn 0, 1 on qp 3
    for (int i = 0; i < 2; i++) begin
      put(mk(PKT_DATA, 3, i));
      chk(recv_valid && !recv.nak && recv.psn == 24'(i) && rx_ready, "in-seq ACK");
      chk(recv.pkt.intr.path_id == 12'h5a5, "INT passed to TX");
      take();
    end
    // gap: psn 3 -> NAK(2), then psn 4 dropped
    put(mk(PKT_DATA, 3, 3));
    chk(recv_valid && recv.nak && recv.psn == 24'd2 && ev_oos, "NAK with expected PSN");
    take();
    put(mk(PKT_DATA, 3, 4));
    chk(!recv_valid && rx_ready, "second OOS dropped");
    take();
    // retransmission fills the gap
    put(mk(PKT_DATA, 3, 2));
    chk(recv_valid && !recv.nak && recv.psn == 24'd2, "gap filled");
    take();
    // duplicate
    put(mk(PKT_DATA, 3, 1));
    chk(recv_valid && !recv.nak && recv.psn == 24'd1, "duplicate re-ACKed");
    take();
    // other qp independent
    put(mk(PKT_DATA, 5, 0));
    chk(recv_valid && !recv.nak, "qp 5 independent");
    take();
    // back-pressure
    recv_ready = 0;
    put(mk(PKT_DATA, 5, 1));
    chk(!rx_ready, "held while TX busy");
    take();
    recv_ready = 1;
    put(mk(PKT_DATA, 5, 1));
    chk(rx_ready && recv_valid && recv.psn == 24'd1, "accepted after stall");
    take();
    // ACK
    put(mk(PKT_ACK, 7, 9));
    chk(note_valid && !note.nak && note.flow == 16'd7 && note.psn == 24'd9 && !recv_valid, "ACK notify");
    chk(note.intr.path_id == 12'h5a5, "ACK INT");
    take();
    // NAK
    put(mk(PKT_NAK, 7, 4));
    chk(note_valid && note.nak && nak_valid && nak.flow == 16'd7 && nak.psn == 24'd4, "NAK notify");
    take();
    // control create and remove
    begin
      pkt_t c;
      c = mk(PKT_CTRL, 9, 0); c.op = OP_WRITE; c.len = 16'd20;
      put(c);
      chk(ctl_valid && !ctl.remove && ctl.flow == 16'd9 && ctl.total_pkts == 24'd20, "create");
      chk(ctl.peer_ip == 32'h0a000001 && ctl.peer_qp == 24'd109 && ctl.local_port == 16'd4791, "peer");
      take();
      c.op = OP_REMOVE;
      put(c);
      chk(ctl_valid && ctl.remove, "remove");
      take();
      // a control packet resets the receive PSN of qp 3
      c = mk(PKT_CTRL, 3, 0); c.op = OP_READ;
      put(c); take();
      put(mk(PKT_DATA, 3, 0));
      chk(recv_valid && !recv.nak, "PSN reset by control");
      take();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
