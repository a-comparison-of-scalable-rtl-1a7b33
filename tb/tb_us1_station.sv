// tb_us1_station: self-checking test of one Ultrascalar I station (4
// registers): register file latching (every cycle unless oldest, or when
// latch_all), modified bits (destination only, or all when oldest), the
// outgoing values with the result inserted and not ready until computed,
// and argument selection by register number.
module tb_us1_station;
  import us_pkg::*;
  import tb_us_pkg::*;

  localparam int unsigned L = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         oldest = 0, latch_all = 0, fill = 0, dealloc = 0, squash = 0, valid;
  rv_t [L-1:0]  reg_in = '0, reg_out, rf;
  logic [L-1:0] modified;
  instr_t       fill_instr = '0;
  logic         done, store_ok, load_ok, commit_ok, mispredict;
  logic         mem_req, mem_we;
  logic [31:0]  mem_addr, mem_wdata;

  us1_station #(.L(L)) dut (
    .clk, .rst_n, .oldest, .latch_all, .reg_in, .reg_out, .modified, .rf,
    .fill, .fill_instr, .dealloc, .squash, .valid,
    .prev_stores_done(1'b1), .prev_loads_done(1'b1), .prev_committed(1'b1),
    .done, .store_ok, .load_ok, .commit_ok, .mispredict,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack(1'b0), .mem_rdata(32'd0));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(rf[2] == '{ready: 1, value: 0}, "reset value 0, ready");
    // not oldest: latches incoming values
    for (int r = 0; r < int'(L); r++) reg_in[r] = '{ready: 1, value: 32'(10 * (r + 1))};
    @(negedge clk);
    check(rf[3].value == 40, "register file latched incoming values");
    check(modified == '0 && reg_out == rf, "empty station modifies nothing");
    // R2 = R0 + R3, with R3 not ready yet
    reg_in[3].ready = 0;
    fill = 1; fill_instr = mk(OP_ADD, 2, 0, 3);
    @(negedge clk); fill = 0;
    check(modified == 4'b0100, "modified bit of destination only");
    check(!reg_out[2].ready, "result not ready");
    check(reg_out[1] == rf[1], "other registers pass from the register file");
    reg_in[3] = '{ready: 1, value: 5};
    @(negedge clk);
    check(reg_out[2] == '{ready: 1, value: 15}, "R2 = R0 + R3 = 15 inserted");
    // oldest: holds its register file, marks every register modified
    oldest = 1;
    @(negedge clk);
    reg_in[0].value = 999;
    @(negedge clk);
    check(modified == 4'b1111, "oldest marks all registers modified");
    check(rf[0].value == 10, "oldest does not latch incoming values");
    check(reg_out[2].value == 15 && reg_out[0].value == 10, "oldest inserts file and result");
    latch_all = 1;
    @(negedge clk); latch_all = 0;
    check(rf[0].value == 999, "oldest latches when the whole window retires");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
