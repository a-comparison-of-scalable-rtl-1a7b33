// tb_us_exec: self-checking test of the execution core: latency of add,
// multiply and divide counted from the cycle the arguments are ready, waiting
// for arguments, the hold while args_current is low, load and store gating by
// the ordering inputs, the memory handshake, branch resolution and
// misprediction, retirement gating by earlier branches, and squash.
module tb_us_exec;
  import us_pkg::*;
  import tb_us_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        fill = 0, dealloc = 0, squash = 0, valid, args_current = 1;
  instr_t      fill_instr = '0, instr;
  rv_t         arg_a = '0, arg_b = '0, result, result_q;
  logic        pst = 1, pld = 1, pcm = 1;
  logic        mem_req, mem_we, mem_ack = 0;
  logic [31:0] mem_addr, mem_wdata, mem_rdata = 0;
  logic        writes, done, store_ok, load_ok, commit_ok, mispredict;

  us_exec dut (.clk, .rst_n, .fill, .fill_instr, .dealloc, .squash, .valid, .instr,
    .arg_a, .arg_b, .args_current, .prev_stores_done(pst), .prev_loads_done(pld),
    .prev_committed(pcm), .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack,
    .mem_rdata, .writes, .result, .result_q, .done, .store_ok, .load_ok,
    .commit_ok, .mispredict);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(instr_t i);
    fill = 1; fill_instr = i;
    @(negedge clk); fill = 0;
  endtask

  task automatic clear();
    dealloc = 1; @(negedge clk); dealloc = 0;
  endtask

  // cycles (counted from the first cycle after the fill) until result.ready
  task automatic latency_test(op_e op, int exp, logic [31:0] expv);
    int n;
    n = 1;
    load(mk(op, 1, 2, 3));
    while (!result.ready && n < 20) begin @(negedge clk); n++; end
    check(n == exp, $sformatf("op %s ready after %0d cycles, expected %0d", op.name(), n, exp));
    check(result.value == expv, $sformatf("op %s value %0d", op.name(), result.value));
    check(!done && !result_q.ready, "done and result_q follow one cycle later");
    @(negedge clk);
    check(done && result_q.ready && result_q.value == expv, "held result");
    clear();
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    arg_a = '{ready: 1, value: 84}; arg_b = '{ready: 1, value: 4};
    latency_test(OP_ADD, 1, 88);
    latency_test(OP_MUL, 3, 336);
    latency_test(OP_DIV, 10, 21);
    check(writes == 0 && valid == 0, "empty after dealloc");

    // waits for its argument, and for args_current
    arg_b.ready = 0;
    load(mk(OP_SUB, 1, 2, 3));
    repeat (3) begin check(!result.ready, "waits for argument b"); @(negedge clk); end
    arg_b.ready = 1; args_current = 0;
    #1 check(!result.ready, "held while args_current low");
    @(negedge clk); args_current = 1;
    #1 check(result.ready && result.value == 80, "sub after arguments current");
    @(negedge clk); clear();

    // load gated by earlier stores
    pst = 0;
    load(mk(OP_LOAD, 1, 2, 0, 16));
    repeat (2) begin check(!mem_req && !load_ok, "load waits for earlier stores"); @(negedge clk); end
    pst = 1;
    #1 check(mem_req && !mem_we && mem_addr == 100, "load request at 84+16");
    @(negedge clk); mem_ack = 1; mem_rdata = 32'hCAFE;
    @(negedge clk); mem_ack = 0;
    check(done && load_ok && result.ready && result.value == 32'hCAFE, "load data");
    clear();

    // store gated by loads, stores and commitment
    pld = 0; pcm = 0;
    load(mk(OP_STORE, 0, 2, 3, 4));
    check(!mem_req && !store_ok, "store waits for earlier loads");
    pld = 1; #1 check(!mem_req, "store waits for earlier branches");
    @(negedge clk); pcm = 1;
    #1 check(mem_req && mem_we && mem_addr == 88 && mem_wdata == 4, "store request");
    @(negedge clk); mem_ack = 1;
    @(negedge clk); mem_ack = 0;
    check(done && store_ok && !writes, "store finished");
    clear();

    // branches
    load(mk(OP_BR, 0, 2, 0, 0, 1'b1));
    check(!commit_ok, "unresolved branch blocks commitment");
    @(negedge clk);
    check(done && commit_ok && !mispredict, "correctly predicted branch");
    clear();
    load(mk(OP_BR, 0, 2, 0, 0, 1'b0));
    @(negedge clk);
    check(done && !commit_ok && mispredict, "mispredicted branch");
    clear();

    // retirement waits for earlier branches
    pcm = 0;
    load(mk(OP_ADD, 1, 2, 3));
    @(negedge clk);
    check(!done && result.ready, "finished but earlier branch unconfirmed");
    pcm = 1; #1 check(done, "retirable once earlier branches confirmed");
    squash = 1; @(negedge clk); squash = 0;
    check(!valid && !done, "squash empties the station");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
