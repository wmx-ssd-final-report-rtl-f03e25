// tb_nand_controller: runs the NAND controller against two behavioural flash
// dies (CE# and CE2#) and checks reset, read status, program page, read page
// (also from a column offset), erase block and die selection. Data read back
// is compared with what the testbench wrote; the flash models check the bus
// timing and the testbench fails on any violation they report.
module tb_nand_controller;
  import wmx_pkg::*;
  logic clk = 0, reset = 1;
  logic [2:0]  cmd;
  logic [31:0] addr;
  logic [12:0] len;
  logic        cmd_loaded = 0, data_loaded = 0;
  logic [7:0]  data_in, data_out, status;
  logic        data_ready, data_done, done, rb;
  logic [6:0]  state;
  logic [7:0]  io_o, io_i, m0_o, m1_o;
  logic        io_oe, ce_n, ce2_n, cle, ale, we_n, re_n, wp_n, rb_n, rb2_n, m0_drv, m1_drv;
  int checks = 0, failures = 0, data_done_count = 0;

  nand_controller dut (
    .clk, .reset, .cmd, .addr, .len, .cmd_loaded, .data_in, .data_loaded, .data_out,
    .data_ready, .data_done, .done, .rb, .status, .current_state_fsm(state),
    .io_o, .io_oe, .io_i, .ce_n, .ce2_n, .cle, .ale, .we_n, .re_n, .wp_n, .rb_n, .rb2_n);

  // short array times keep the run brief; interface timings are the real ones
  nand_flash_model #(.TR_NS(2000), .TPROG_NS(5000), .TBERS_NS(8000), .TRST_NS(1000)) die0 (
    .ce_n, .cle, .ale, .we_n, .re_n, .wp_n, .io_i(io_o), .io_o(m0_o), .io_drive(m0_drv), .rb_n);
  nand_flash_model #(.TR_NS(2000), .TPROG_NS(5000), .TBERS_NS(8000), .TRST_NS(1000)) die1 (
    .ce_n(ce2_n), .cle, .ale, .we_n, .re_n, .wp_n, .io_i(io_o), .io_o(m1_o), .io_drive(m1_drv),
    .rb_n(rb2_n));

  assign io_i = m0_drv ? m0_o : (m1_drv ? m1_o : 8'hFF);

  always #5 clk = ~clk;
  always @(posedge clk) if (data_done) data_done_count++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] mkaddr(input bit die, input int row, input int col);
    return {die, 18'(row), 13'(col)};
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  task automatic issue(input nand_cmd_e c, input logic [31:0] a, input int n);
    @(negedge clk);
    cmd = c; addr = a; len = 13'(n); cmd_loaded = 1;
    @(negedge clk);
    cmd_loaded = 0;
  endtask

  task automatic wait_done();
    int guard = 0;
    while (!done && guard < 500000) begin @(negedge clk); guard++; end
    if (guard >= 500000) begin failures++; $display("FAIL command never finished"); end
    @(negedge clk);
  endtask

  task automatic program_page(input logic [31:0] a, input logic [7:0] bytes[$]);
    issue(NAND_PROGRAM_PAGE, a, bytes.size());
    foreach (bytes[i]) begin
      while (!data_ready) @(negedge clk);
      data_in = bytes[i]; data_loaded = 1;
      @(negedge clk);
      data_loaded = 0;
    end
    wait_done();
  endtask

  task automatic read_page(input logic [31:0] a, input int n, output logic [7:0] bytes[$]);
    bytes = {};
    issue(NAND_READ_PAGE, a, n);
    for (int i = 0; i < n; i++) begin
      while (!data_ready) @(negedge clk);
      bytes.push_back(data_out);
      data_loaded = 1;
      @(negedge clk);
      data_loaded = 0;
    end
    wait_done();
  endtask

  initial begin
    logic [7:0] wr0[$], wr1[$], rd[$];
    int mism;
    cmd = '0; addr = '0; len = '0; data_in = '0;
    repeat (4) @(negedge clk);
    reset = 0;
    @(negedge clk);
    check("WP# released after reset", int'(wp_n), 1);

    issue(NAND_RESET, mkaddr(0, 0, 0), 0); wait_done();
    issue(NAND_RESET, mkaddr(1, 0, 0), 0); wait_done();
    check("die0 reset", die0.n_resets, 1);
    check("die1 reset", die1.n_resets, 1);

    issue(NAND_READ_STATUS, mkaddr(0, 0, 0), 0); wait_done();
    check("status after reset", int'(status), 'hE0);
    check("rb reports ready", int'(rb), 1);

    for (int i = 0; i < 300; i++) wr0.push_back(8'($urandom));
    program_page(mkaddr(0, 5, 0), wr0);
    check("program status", int'(status), 'hE0);
    check("die0 programmed", die0.n_programs, 1);
    check("data_done after program", data_done_count, 1);

    read_page(mkaddr(0, 5, 0), 300, rd);
    mism = 0;
    foreach (rd[i]) if (rd[i] != wr0[i]) mism++;
    check("read back page", mism, 0);
    check("data_done after read", data_done_count, 2);

    read_page(mkaddr(0, 5, 100), 50, rd);
    mism = 0;
    foreach (rd[i]) if (rd[i] != wr0[100 + i]) mism++;
    check("read from column 100", mism, 0);

    // second die, same row: isolated from the first
    for (int i = 0; i < 64; i++) wr1.push_back(8'(i * 7 + 3));
    program_page(mkaddr(1, 5, 0), wr1);
    check("die1 programmed", die1.n_programs, 1);
    read_page(mkaddr(1, 5, 0), 64, rd);
    mism = 0;
    foreach (rd[i]) if (rd[i] != wr1[i]) mism++;
    check("die1 read back", mism, 0);
    read_page(mkaddr(0, 5, 0), 4, rd);
    check("die0 untouched", int'(rd[3]), int'(wr0[3]));

    // erase the block of row 5 on die 0 (rows 0..63)
    issue(NAND_ERASE_BLOCK, mkaddr(0, 5, 0), 0); wait_done();
    check("erase status", int'(status), 'hE0);
    check("die0 erased", die0.n_erases, 1);
    read_page(mkaddr(0, 5, 0), 16, rd);
    mism = 0;
    foreach (rd[i]) if (rd[i] != 8'hFF) mism++;
    check("erased page reads FF", mism, 0);

    check("flash timing violations", die0.violations + die1.violations, 0);
    check("controller back in idle", int'(state), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
