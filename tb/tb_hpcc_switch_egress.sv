// tb_hpcc_switch_egress -- self-checking test of a switch egress port.
//
// Pushes a burst of eight 1000-byte data packets and one ACK into a
// 100 Gbit/s port (62.5 bytes per 5 ns clock) and checks:
//   * spacing of departures: 1000 bytes take 16 clocks (80 ns) on the link;
//   * INT: nHop and pathID updated, TS steps of 80 ns, txBytes advancing by
//     the packet bytes in 128-byte units, qLen equal to the bytes left queued
//     in 80-byte units (computed here from the packets still inside);
//   * the ACK passes without a record, queue occupancy returns to zero,
//     back-pressure when the queue is full.
module tb_hpcc_switch_egress;
  import hpcc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  pkt_t in_pkt, out_pkt;
  logic [31:0] qlen;
  int checks = 0, failures = 0;

  hpcc_switch_egress #(.QUEUE_PKTS(16)) dut (
    .clk, .rst_n, .in_valid, .in_pkt, .in_ready,
    .out_valid, .out_pkt, .out_ready, .qlen_bytes(qlen));

  always #2.5 clk = ~clk;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // receiver side
  int   n_out = 0;
  longint t_prev, t_now;
  int_hop_t prev_rec;
  int   sent_bytes = 0;
  int   queued_after [$];

  initial begin
    in_valid = 0; in_pkt = '0; out_ready = 1;
    repeat (4) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // burst of 8 data packets then one ACK
    for (int i = 0; i < 9; i++) begin
      in_valid <= 1;
      in_pkt   <= '0;
      in_pkt.kind <= (i == 8) ? PKT_ACK : PKT_DATA;
      in_pkt.psn  <= 24'(i);
      in_pkt.len  <= (i == 8) ? 16'd64 : 16'd1000;
      in_pkt.intr.nhop <= 4'd1;
      in_pkt.intr.path_id <= 12'h100;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 0;
    wait (n_out == 9);
    repeat (40) @(posedge clk);
    chk(qlen == 0, "queue empty at end");
    // back-pressure: fill 16 entries with the output blocked
    out_ready <= 0;
    for (int i = 0; i < 17; i++) begin
      in_valid <= 1; in_pkt <= '0; in_pkt.len <= 16'd100; in_pkt.kind <= PKT_CTRL;
      @(posedge clk);
    end
    in_valid <= 0;
    @(posedge clk);
    chk(!in_ready, "full queue refuses input");
    out_ready <= 1;
    repeat (200) @(posedge clk);
    chk(in_ready && qlen == 0, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready && n_out < 9) begin
      t_now = $time / 5;
      if (out_pkt.kind == PKT_DATA) begin
        int_hop_t r;
        int left;
        r = out_pkt.intr.hop[1];
        sent_bytes += 1000;
        chk(out_pkt.intr.nhop == 4'd2, "nhop incremented");
        chk(out_pkt.intr.path_id == (12'h100 ^ 12'h001), "pathID xor");
        chk(r.b == SPD_100G, "speed code");
        chk(r.tx_bytes == 20'(sent_bytes / 128), "txBytes");
        // bytes still queued behind this packet: the remaining data packets + ACK
        // (packet 0 leaves at once, before the rest of the burst has arrived)
        left = (out_pkt.psn == 0) ? 0 : (7 - int'(out_pkt.psn)) * 1000 + 64;
        chk(r.qlen == 16'(left / 80), "qLen");
        if (n_out > 0) begin
          chk(t_now - t_prev == 16, "link spacing 16 clocks");
          chk(r.ts - prev_rec.ts == 24'd80, "TS step 80 ns");
        end
        prev_rec = r;
        t_prev = t_now;
      end else begin
        chk(out_pkt.intr.nhop == 4'd1, "ACK not stamped");
        chk(t_now - t_prev == 16, "ACK after last data packet");
      end
      n_out++;
    end
  end
endmodule
