// tb_hpcc_tx_pipe -- self-checking test of the NIC transmit pipe.
//
// Loads a flow context, sends PktSend events and checks the data packets
// (addresses, QP, PSN from the context, empty INT); answers a received data
// packet and checks the ACK/NAK (addresses swapped, INT copied); applies a
// NAK and checks that the PSN context goes back; checks that replies win
// over data and that a blocked MAC holds the packet.
module tb_hpcc_tx_pipe;
  import hpcc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ctl_valid, send_valid, send_ready, recv_valid, recv_ready, nak_valid;
  logic mac_valid, mac_ready, ev_gbn;
  flow_ctrl_t ctl;
  pkt_send_t send;
  pkt_recv_t recv;
  nak_note_t nak;
  pkt_t mac_pkt;
  int checks = 0, failures = 0;

  hpcc_tx_pipe #(.NUM_FLOWS(16)) dut (.*);

  always #2.5 clk = ~clk;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic do_send(int psn);
    send_valid = 1; send.flow = 16'd4; send.psn = 24'(psn);
    @(posedge clk); #0.1; send_valid = 0;
  endtask

  initial begin
    ctl_valid = 0; send_valid = 0; recv_valid = 0; nak_valid = 0; mac_ready = 1;
    ctl = '0; send = '0; recv = '0; nak = '0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk); #0.1;
    ctl_valid = 1; ctl.flow = 16'd4; ctl.op = OP_WRITE; ctl.local_ip = 32'h0a000002;
    ctl.peer_ip = 32'h0a000009; ctl.local_port = 16'd4791; ctl.peer_port = 16'd5000;
    ctl.peer_qp = 24'h000123;
    @(posedge clk); #0.1; ctl_valid = 0;
    for (int i = 0; i < 3; i++) begin
      do_send(i);
      chk(mac_valid && mac_pkt.kind == PKT_DATA && mac_pkt.psn == 24'(i), "data psn");
      chk(mac_pkt.dst_ip == 32'h0a000009 && mac_pkt.src_ip == 32'h0a000002 &&
          mac_pkt.dest_qp == 24'h123 && mac_pkt.src_qp == 24'd4 && mac_pkt.op == OP_WRITE, "data header");
      chk(mac_pkt.len == 16'd1000 && mac_pkt.intr == '0, "data len, empty INT");
    end
    // NAK: go back to psn 1
    nak_valid = 1; nak.flow = 16'd4; nak.psn = 24'd1;
    @(posedge clk); #0.1; nak_valid = 0;
    chk(ev_gbn, "go-back-N event");
    do_send(1);
    chk(mac_pkt.psn == 24'd1, "retransmit from NAK psn");
    // reply to a data packet
    recv_valid = 1; recv.nak = 0; recv.psn = 24'd77;
    recv.pkt = '0; recv.pkt.kind = PKT_DATA; recv.pkt.src_ip = 32'h0a000005;
    recv.pkt.dst_ip = 32'h0a000002; recv.pkt.src_port = 16'd6000; recv.pkt.dst_port = 16'd4791;
    recv.pkt.src_qp = 24'd55; recv.pkt.dest_qp = 24'd7; recv.pkt.intr.nhop = 4'd2;
    recv.pkt.intr.path_id = 12'habc; recv.pkt.intr.hop[1].qlen = 16'd321;
    send_valid = 1; send.flow = 16'd4; send.psn = 24'd2;
    #1;
    chk(!send_ready && recv_ready, "reply has priority");
    @(posedge clk); #0.1; recv_valid = 0;
    chk(mac_pkt.kind == PKT_ACK && mac_pkt.psn == 24'd77, "ACK");
    chk(mac_pkt.dst_ip == 32'h0a000005 && mac_pkt.src_ip == 32'h0a000002 &&
        mac_pkt.dst_port == 16'd6000 && mac_pkt.dest_qp == 24'd55 && mac_pkt.src_qp == 24'd7, "ACK addresses swapped");
    chk(mac_pkt.intr == recv.pkt.intr, "INT copied into ACK");
    #1;
    chk(send_ready, "data goes after the reply");
    @(posedge clk); #0.1; send_valid = 0;
    chk(mac_pkt.kind == PKT_DATA && mac_pkt.psn == 24'd2, "data after reply");
    // NAK reply
    recv_valid = 1; recv.nak = 1; recv.psn = 24'd5;
    @(posedge clk); #0.1; recv_valid = 0;
    chk(mac_pkt.kind == PKT_NAK && mac_pkt.psn == 24'd5, "NAK reply");
    // blocked MAC
    mac_ready = 0;
    send_valid = 1; send.psn = 24'd3; #1;
    chk(!send_ready, "blocked MAC stalls PktSend");
    @(posedge clk); #0.1;
    chk(mac_valid && mac_pkt.kind == PKT_NAK, "packet held");
    mac_ready = 1; #1;
    chk(send_ready, "ready once MAC takes the packet");
    @(posedge clk); #0.1; send_valid = 0;
    chk(mac_pkt.kind == PKT_DATA && mac_pkt.psn == 24'd3, "next packet");
    @(posedge clk); #0.1;
    chk(!mac_valid, "output idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
