// tb_hpcc_int_stamp -- self-checking test of the INT insertion of one hop.
//
// Stamps a header three times as three switches would and checks nHop, the
// pathID XOR, the record placed in the right slot with the unit conversions
// (128-byte txBytes, 80-byte qLen with saturation), earlier records left
// intact, and that a full header (MAX_HOPS records) passes unchanged.
module tb_hpcc_int_stamp;
  import hpcc_pkg::*;
  int_hdr_t hin, hout;
  logic [11:0] sid;
  logic [3:0]  spd;
  logic [23:0] ts;
  logic [39:0] txb;
  logic [31:0] ql;
  int checks = 0, failures = 0;

  hpcc_int_stamp dut (.hdr_in(hin), .switch_id(sid), .speed(spd), .ts_ns(ts),
                      .tx_bytes_total(txb), .qlen_bytes(ql), .hdr_out(hout));

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    hin = '0;
    sid = 12'h0a5; spd = SPD_100G; ts = 24'h123456; txb = 40'd1280; ql = 32'd800;
    #1;
    chk(hout.nhop == 4'd1, "nhop 1");
    chk(hout.path_id == 12'h0a5, "path 1");
    chk(hout.hop[0].b == SPD_100G, "b");
    chk(hout.hop[0].ts == 24'h123456, "ts");
    chk(hout.hop[0].tx_bytes == 20'd10, "txbytes units of 128");
    chk(hout.hop[0].qlen == 16'd10, "qlen units of 80");
    hin = hout;
    sid = 12'h3c0; spd = SPD_25G; ts = 24'h000100; txb = 40'h12_3456_7890; ql = 32'd8_000_000;
    #1;
    chk(hout.nhop == 4'd2, "nhop 2");
    chk(hout.path_id == (12'h0a5 ^ 12'h3c0), "path xor");
    chk(hout.hop[0] == hin.hop[0], "hop0 kept");
    chk(hout.hop[1].b == SPD_25G, "b2");
    chk(hout.hop[1].tx_bytes == 20'(40'h12_3456_7890 >> 7), "txbytes wrap");
    chk(hout.hop[1].qlen == 16'hffff, "qlen saturates");
    // full header passes unchanged
    hin = '0; hin.nhop = 4'd5; hin.path_id = 12'h777;
    #1;
    chk(hout == hin, "full header unchanged");
    // fill hops 0..4 in turn
    hin = '0;
    for (int h = 0; h < 5; h++) begin
      sid = 12'(h + 1); ts = 24'(h * 1000); txb = 40'(h * 128); ql = 32'(h * 80);
      #1;
      chk(hout.hop[h].ts == 24'(h * 1000) && hout.hop[h].qlen == 16'(h), "slot order");
      hin = hout;
    end
    chk(hin.path_id == (12'd1 ^ 12'd2 ^ 12'd3 ^ 12'd4 ^ 12'd5), "path of five");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
