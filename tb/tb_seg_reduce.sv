// tb_seg_reduce: self-checking test of the segmented reduction tree of one
// log-depth Ultrascalar II column: random comparator results and values,
// checked against the latest matching row, for 11 and 16 rows.
module tb_seg_reduce;
  logic [10:0]       hit11;
  logic [10:0][32:0] val11;
  logic              any11;
  logic [32:0]       y11;
  logic [15:0]       hit16;
  logic [15:0][7:0]  val16;
  logic              any16;
  logic [7:0]        y16;

  seg_reduce #(.N(11), .W(33)) u11 (.hit(hit11), .val(val11), .any(any11), .y(y11));
  seg_reduce #(.N(16), .W(8))  u16 (.hit(hit16), .val(val16), .any(any16), .y(y16));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int last11, last16;
      last11 = -1; last16 = -1;
      hit11 = 11'($urandom) & 11'($urandom);
      hit16 = 16'($urandom) & 16'($urandom) & 16'($urandom);
      if (t % 10 == 0) hit16 = '0;
      for (int i = 0; i < 11; i++) val11[i] = {1'($urandom), 32'($urandom)};
      for (int i = 0; i < 16; i++) val16[i] = 8'($urandom);
      #1;
      for (int i = 0; i < 11; i++) if (hit11[i]) last11 = i;
      for (int i = 0; i < 16; i++) if (hit16[i]) last16 = i;
      check(any11 == (last11 >= 0), "any (11 rows)");
      check(any16 == (last16 >= 0), "any (16 rows)");
      if (last11 >= 0) check(y11 == val11[last11], "latest match (11 rows)");
      if (last16 >= 0) check(y16 == val16[last16], "latest match (16 rows)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
