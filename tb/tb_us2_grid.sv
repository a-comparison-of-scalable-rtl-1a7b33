// tb_us2_grid: self-checking test of the Ultrascalar II register grid.
// Two instances (TREE=0 linear multiplexer chains, TREE=1 segmented
// reduction trees) with 8 stations and 8 registers get the same random
// register file, station writes and argument requests. Both are compared
// with a behavioural model of the nearest earlier writer. Directed cases
// check the Fig 7 example of a shadowed unfinished write and that the
// outgoing columns use the current-cycle result.
module tb_us2_grid;
  import us_pkg::*;

  localparam int unsigned C = 8, L = 8;

  rv_t  [L-1:0]             rf;
  logic [C-1:0]             st_writes;
  logic [C-1:0][RIDX_W-1:0] st_rd, st_rs1, st_rs2;
  rv_t  [C-1:0]             st_res, st_res_now;
  rv_t  [C-1:0]             a0, b0, a1, b1;
  rv_t  [L-1:0]             o0, o1;
  logic [L-1:0]             w0, w1;

  us2_grid #(.C(C), .L(L), .TREE(1'b0)) u_lin (
    .rf, .st_writes, .st_rd, .st_res, .st_res_now, .st_rs1, .st_rs2,
    .arg_a(a0), .arg_b(b0), .reg_out(o0), .written(w0));
  us2_grid #(.C(C), .L(L), .TREE(1'b1)) u_tree (
    .rf, .st_writes, .st_rd, .st_res, .st_res_now, .st_rs1, .st_rs2,
    .arg_a(a1), .arg_b(b1), .reg_out(o1), .written(w1));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rv_t rv(bit rdy, logic [31:0] v);
    rv_t x;
    x.ready = rdy; x.value = v;
    return x;
  endfunction

  // Value register r has as seen by station j (j = C: after all stations).
  function automatic rv_t model(int j, int r, bit now);
    rv_t v;
    v = rf[r];
    for (int k = 0; k < j; k++)
      if (st_writes[k] && int'(st_rd[k]) == r)
        v = (now && j == int'(C)) ? st_res_now[k] : st_res[k];
    return v;
  endfunction

  task automatic compare(string tag);
    logic [L-1:0] wexp;
    for (int j = 0; j < int'(C); j++) begin
      rv_t ea, eb;
      ea = model(j, int'(st_rs1[j]), 0);
      eb = model(j, int'(st_rs2[j]), 0);
      check(a0[j] == ea && a1[j] == ea, $sformatf("%s arg_a[%0d]", tag, j));
      check(b0[j] == eb && b1[j] == eb, $sformatf("%s arg_b[%0d]", tag, j));
    end
    wexp = '0;
    for (int r = 0; r < int'(L); r++) begin
      rv_t eo;
      eo = model(C, r, 1);
      check(o0[r] == eo && o1[r] == eo, $sformatf("%s reg_out[%0d]", tag, r));
    end
    for (int k = 0; k < int'(C); k++) if (st_writes[k]) wexp[st_rd[k]] = 1'b1;
    check(w0 == wexp && w1 == wexp, $sformatf("%s written", tag));
  endtask

  initial begin
    // Register file R0=4 R1=13 R2=-7 R3=5 as in Fig 7. Station 0 writes R1
    // (unfinished), station 1 writes R2 = 9, station 2 writes R1 = -1
    // (finished, shadows station 0); station 3 reads R1 and must see station 2.
    rf = '0; st_writes = '0; st_rd = '0; st_rs1 = '0; st_rs2 = '0;
    st_res = '0; st_res_now = '0;
    rf[0] = '{1, 4}; rf[1] = '{1, 13}; rf[2] = '{1, -7}; rf[3] = '{1, 5};
    st_writes = 8'b0000_0111;
    st_rd[0] = 1; st_res[0] = '{0, 0};  st_res_now[0] = '{0, 0};
    st_rd[1] = 2; st_res[1] = '{1, 9};  st_res_now[1] = '{1, 9};
    st_rd[2] = 1; st_res[2] = '{1, -1}; st_res_now[2] = '{1, -1};
    st_rs1[1] = 0; st_rs2[1] = 1; st_rs1[3] = 1; st_rs2[3] = 3;
    #1;
    check(b0[1] == rv(0, 0) && b1[1] == rv(0, 0), "station 1 waits on unfinished R1");
    check(a0[3] == rv(1, -1) && a1[3] == rv(1, -1), "station 3 sees shadowing write of R1");
    check(o0[1] == rv(1, -1) && o1[2] == rv(1, 9), "outgoing R1, R2");
    compare("fig7");
    // result computed this cycle: outgoing sees it, arguments do not
    st_res_now[0] = '{1, 77}; st_writes[2] = 0;
    #1;
    check(o0[1] == rv(1, 77) && o1[1] == rv(1, 77), "outgoing uses current-cycle result");
    check(b0[1] == rv(0, 0), "argument uses registered result");
    compare("now");
    for (int t = 0; t < 3000; t++) begin
      for (int r = 0; r < int'(L); r++) rf[r] = '{ready: 1'($urandom), value: $urandom};
      for (int k = 0; k < int'(C); k++) begin
        st_writes[k] = 1'($urandom);
        st_rd[k]  = RIDX_W'($urandom_range(0, L - 1));
        st_rs1[k] = RIDX_W'($urandom_range(0, L - 1));
        st_rs2[k] = RIDX_W'($urandom_range(0, L - 1));
        st_res[k] = '{ready: 1'($urandom), value: $urandom};
        st_res_now[k] = st_res[k].ready ? st_res[k]
                      : rv(1'($urandom), $urandom);
      end
      #1;
      compare("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
