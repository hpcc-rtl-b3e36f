// tb_hpcc_recip_div -- self-checking test of the reciprocal-table divider.
//
// Drives random and corner-case operands and compares q with the exact
// quotient x / n computed by the simulator: q must lie within the table's
// relative error bound (eps = 2^-8 above, reciprocal rounding below) plus one
// LSB. Powers of two must divide exactly, n = 0 must saturate.
module tb_hpcc_recip_div;
  logic [47:0] x;
  logic [21:0] n;
  logic [47:0] q;
  int checks = 0, failures = 0;

  hpcc_recip_div dut (.x(x), .n(n), .q(q));

  task automatic check_one(longint unsigned xv, int unsigned nv);
    real exact, lo, hi;
    x = 48'(xv); n = 22'(nv);
    #1;
    checks++;
    if (nv == 0) begin
      if (q !== '1) begin failures++; $display("FAIL n=0 q=%h", q); end
      return;
    end
    exact = real'(xv) / real'(nv);
    lo = exact * (1.0 - 1.0/32768.0) - 1.0;
    hi = exact * (1.0 + 1.0/256.0) + 1.0;
    if (real'(q) < lo || real'(q) > hi) begin
      failures++;
      $display("FAIL x=%0d n=%0d q=%0d exact=%f", xv, nv, q, exact);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // exact powers of two
    for (int e = 0; e < 22; e++) begin
      x = 48'h123456789a; n = 22'(1 << e); #1;
      checks++;
      if (q != (48'h123456789a >> e)) begin
        failures++; $display("FAIL pow2 e=%0d q=%h", e, q);
      end
    end
    check_one(1000, 0);
    check_one(0, 77);
    check_one(1, 1);
    check_one(1000000, 3);
    check_one(1000000, 7);
    check_one(48'hffffffffff, 22'h3fffff);
    check_one(1 << 40, 257);
    check_one(1 << 40, 511);
    for (int i = 0; i < 3000; i++) begin
      longint unsigned xv;
      int unsigned nv;
      xv = {$urandom, $urandom} & 64'h0000_ffff_ffff_ffff;
      xv = xv >> ($urandom % 40);
      nv = $urandom & 32'h3fffff;
      nv = nv >> ($urandom % 22);
      if (nv == 0) nv = 1;
      check_one(xv, nv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
