// hpcc_flow_engine -- one scheduling engine of the HPCC flow scheduler.
//
// The engine owns a fixed array of FPE flow slots and visits them in
// round-robin order, one slot per clock. Each visit of an active slot adds
// credit in proportion to the slot's pacing rate (rate x FPE bytes, since a
// slot is visited every FPE clocks). If the credit covers one packet, the
// sending window still has room (inflight bytes below W) and the message has
// unsent packets, the engine raises a PktSend event for that slot and
// advances snd_nxt. Credit is capped at two packets so that an idle or
// window-blocked flow does not build up a burst.
//
// Besides pacing, the engine keeps per slot the window W and rate R (written
// by Update events from the CC module), snd_nxt and snd_una (packets sent and
// cumulatively acknowledged), and the message length. An ACK for psn moves
// snd_una to psn+1; a NAK for psn moves snd_una to psn and rewinds snd_nxt to
// psn (go-back-N); a NAK below snd_una is stale and ignored. A created flow
// starts at W = W_init and the line rate.
//
// Interface: create/remove, ack and upd are single-cycle commands that are
// always accepted; send_valid/send_ready is a handshake (a visit whose
// PktSend is not accepted sends nothing and is retried on the next round).
// rd_slot/rd_snd_nxt is a combinational read port for snd_nxt.
// Timing: one visit per clock, so a slot is served every FPE clocks.
//
// The round-robin visit of a fixed array, credit proportional to the pacing
// rate and the window check follow HPCC; the credit cap, the "inflight below
// W" window test and the per-slot fields are choices of this design.
module hpcc_flow_engine
  import hpcc_pkg::*;
#(
  parameter int unsigned FPE       = 50,     // flows per engine
  parameter int unsigned PKT_BYTES = 1000,   // payload bytes per packet
  parameter int unsigned W_INIT    = 28125,  // 25 Gbit/s x 9 us
  parameter int unsigned R_INIT    = 1024000 // 15.625 B/clk (25 Gbit/s, 5 ns), RATE_FRAC bits
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // create / remove
  input  logic                   ctl_valid,
  input  logic                   ctl_remove,
  input  logic [$clog2(FPE)-1:0] ctl_slot,
  input  logic [PSN_W-1:0]       ctl_total,
  // ACK / NAK
  input  logic                   ack_valid,
  input  logic                   ack_nak,
  input  logic [$clog2(FPE)-1:0] ack_slot,
  input  logic [PSN_W-1:0]       ack_psn,
  // Update from CC
  input  logic                   upd_valid,
  input  logic [$clog2(FPE)-1:0] upd_slot,
  input  logic [WIN_W-1:0]       upd_win,
  input  logic [RATE_W-1:0]      upd_rate,
  // PktSend
  output logic                   send_valid,
  output logic [$clog2(FPE)-1:0] send_slot,
  output logic [PSN_W-1:0]       send_psn,
  input  logic                   send_ready,
  // snd_nxt read port
  input  logic [$clog2(FPE)-1:0] rd_slot,
  output logic [PSN_W-1:0]       rd_snd_nxt,
  // one-cycle event pulses, for monitoring
  output logic                   ev_win_block,   // credit ready, window full
  output logic                   ev_credit_wait  // window open, credit short
);

  localparam int SW = $clog2(FPE);
  localparam int CR_W = 32;  // credit, bytes with RATE_FRAC fraction bits
  localparam longint unsigned PKT_CR = longint'(PKT_BYTES) << RATE_FRAC;
  localparam longint unsigned CR_CAP = 2 * PKT_CR;

  logic             active  [FPE];
  logic [WIN_W-1:0] win     [FPE];
  logic [RATE_W-1:0] rate   [FPE];
  logic [CR_W-1:0]  credit  [FPE];
  logic [PSN_W-1:0] snd_nxt [FPE];
  logic [PSN_W-1:0] snd_una [FPE];
  logic [PSN_W-1:0] total   [FPE];

  logic [SW-1:0] ptr;

  // ------------------------------------------------------------- visit
  logic [CR_W+8:0]  cr_sum;
  logic [CR_W-1:0]  cr_new;
  logic [47:0]      infl_bytes;
  logic             win_ok, cr_ok, has_data, fire;

  always_comb begin
    cr_sum     = (CR_W+9)'(credit[ptr]) + (CR_W+9)'(longint'(rate[ptr]) * FPE);
    cr_new     = (cr_sum > (CR_W+9)'(CR_CAP)) ? CR_W'(CR_CAP) : CR_W'(cr_sum);
    infl_bytes = 48'(snd_nxt[ptr] - snd_una[ptr]) * 48'(PKT_BYTES);
    win_ok     = infl_bytes < 48'(win[ptr]);
    cr_ok      = cr_new >= CR_W'(PKT_CR);
    has_data   = snd_nxt[ptr] < total[ptr];
    send_valid = active[ptr] && win_ok && cr_ok && has_data;
    send_slot  = ptr;
    send_psn   = snd_nxt[ptr];
    fire       = send_valid && send_ready;
    ev_win_block   = active[ptr] && has_data && cr_ok && !win_ok;
    ev_credit_wait = active[ptr] && has_data && win_ok && !cr_ok;
  end

  assign rd_snd_nxt = snd_nxt[rd_slot];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr <= '0;
      for (int i = 0; i < int'(FPE); i++) begin
        active[i]  <= 1'b0;
        win[i]     <= '0;
        rate[i]    <= '0;
        credit[i]  <= '0;
        snd_nxt[i] <= '0;
        snd_una[i] <= '0;
        total[i]   <= '0;
      end
    end else begin
      ptr <= (ptr == SW'(FPE - 1)) ? '0 : ptr + SW'(1);

      // visit
      if (active[ptr]) begin
        if (fire) begin
          credit[ptr]  <= cr_new - CR_W'(PKT_CR);
          snd_nxt[ptr] <= snd_nxt[ptr] + PSN_W'(1);
        end else begin
          credit[ptr]  <= cr_new;
        end
      end

      // Update event from the CC module
      if (upd_valid) begin
        win[upd_slot]  <= upd_win;
        rate[upd_slot] <= upd_rate;
      end

      // ACK / NAK (cumulative; stale ACKs are ignored)
      if (ack_valid) begin
        if (ack_nak) begin
          // a NAK below snd_una is stale and ignored
          if ($signed(ack_psn - snd_una[ack_slot]) >= 0) begin
            snd_una[ack_slot] <= ack_psn;
            snd_nxt[ack_slot] <= ack_psn;
          end
        end else if ($signed(ack_psn + PSN_W'(1) - snd_una[ack_slot]) > 0) begin
          snd_una[ack_slot] <= ack_psn + PSN_W'(1);
        end
      end

      // create / remove wins over everything else
      if (ctl_valid) begin
        active[ctl_slot]  <= !ctl_remove;
        win[ctl_slot]     <= WIN_W'(W_INIT);
        rate[ctl_slot]    <= RATE_W'(R_INIT);
        credit[ctl_slot]  <= '0;
        snd_nxt[ctl_slot] <= '0;
        snd_una[ctl_slot] <= '0;
        total[ctl_slot]   <= ctl_remove ? '0 : ctl_total;
      end
    end
  end

  // A slot never has more packets outstanding than it has sent.
  assert property (@(posedge clk) disable iff (!rst_n)
                   $signed(snd_nxt[ptr] - snd_una[ptr]) >= 0 || !active[ptr]);

endmodule
