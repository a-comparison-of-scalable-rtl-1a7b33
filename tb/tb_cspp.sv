// tb_cspp: self-checking test of the cyclic segmented parallel-prefix circuit.
//
// Checks the two worked examples of the design (register R0 with the oldest
// station 6 inserting 10, station 7 inserting a value not yet ready and
// station 4 inserting 42; and the 1-bit AND circuit with the oldest station 6
// and stations 6, 7, 0, 1, 3 meeting the condition), then compares random
// inputs against a reference that walks backwards around the ring, for both
// operators and for a ring of 8 and of 5 leaves.
module tb_cspp;
  localparam int unsigned W = 33;

  logic [7:0]        seg8, and_seg8, and_val8;
  logic [7:0][W-1:0] val8, out8;
  logic [7:0]        and_out8;
  logic [4:0]        seg5, and_seg5, and_val5, and_out5;
  logic [4:0][7:0]   val5, out5;

  cspp #(.N(8), .W(W), .OP_AND(1'b0)) u_reg8 (.seg(seg8), .val(val8), .out(out8));
  cspp #(.N(8), .W(1), .OP_AND(1'b1)) u_and8 (.seg(and_seg8), .val(and_val8), .out(and_out8));
  cspp #(.N(5), .W(8), .OP_AND(1'b0)) u_reg5 (.seg(seg5), .val(val5), .out(out5));
  cspp #(.N(5), .W(1), .OP_AND(1'b1)) u_and5 (.seg(and_seg5), .val(and_val5), .out(and_out5));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // reference: value of nearest preceding leaf with a raised segment bit
  function automatic int nearest(int n, int i, logic [7:0] s);
    for (int d = 1; d <= n; d++) begin
      int j = (i - d + n) % n;
      if (s[j]) return j;
    end
    return -1;
  endfunction

  function automatic bit and_ref(int n, int i, logic [7:0] s, logic [7:0] v);
    bit acc = 1'b1;
    for (int d = 1; d <= n; d++) begin
      int j = (i - d + n) % n;
      acc &= v[j];
      if (s[j]) break;
    end
    return acc;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // register example: R0
    seg8 = 8'b1101_0000; val8 = '0;
    val8[6] = {1'b1, 32'd10};
    val8[7] = {1'b0, 32'd0};
    val8[4] = {1'b1, 32'd42};
    and_seg8 = 8'b0100_0000; and_val8 = 8'b1100_1011;
    seg5 = '0; val5 = '0; and_seg5 = 5'b1; and_val5 = '1;
    #1;
    check(out8[7] == {1'b1, 32'd10}, "station 7 receives R0 = 10");
    for (int i = 0; i <= 4; i++) check(out8[i][32] == 1'b0, $sformatf("station %0d sees R0 not ready", i));
    check(out8[5] == {1'b1, 32'd42} && out8[6] == {1'b1, 32'd42}, "stations 5, 6 receive 42");
    check(and_out8[6:3] == 4'b0000 && and_out8[7] && and_out8[2:0] == 3'b111, "AND example exact");

    for (int t = 0; t < 2000; t++) begin
      seg8 = 8'($urandom); and_val8 = 8'($urandom); and_seg8 = 8'($urandom);
      for (int i = 0; i < 8; i++) val8[i] = {1'($urandom), 32'($urandom)};
      seg5 = 5'($urandom); and_val5 = 5'($urandom); and_seg5 = 5'($urandom);
      for (int i = 0; i < 5; i++) val5[i] = 8'($urandom);
      #1;
      for (int i = 0; i < 8; i++) begin
        int j;
        j = nearest(8, i, seg8);
        if (j >= 0) check(out8[i] == val8[j], $sformatf("reg8 leaf %0d", i));
        if (and_seg8 != 0) check(and_out8[i] == and_ref(8, i, and_seg8, and_val8), $sformatf("and8 leaf %0d", i));
      end
      for (int i = 0; i < 5; i++) begin
        int j;
        j = nearest(5, i, {3'b0, seg5});
        if (j >= 0) check(out5[i] == val5[j], $sformatf("reg5 leaf %0d", i));
        if (and_seg5 != 0) check(and_out5[i] == and_ref(5, i, {3'b0, and_seg5}, {3'b0, and_val5}), $sformatf("and5 leaf %0d", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
