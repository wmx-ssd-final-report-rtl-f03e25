// tb_nand_fsl: drives the NAND FSL peripheral through modelled FSL FIFOs, as
// the processor firmware would, against two behavioural flash dies. It
// programs and reads back a full 4096-byte page, an odd-length page, erases a
// block, checks completion words and status, checks that a stray data word
// before a header is dropped, and throttles the master channel with
// FSL_M_Full to exercise back-pressure.
module tb_nand_fsl;
  import wmx_pkg::*;
  logic clk = 0, rst = 1;
  logic [31:0] s_data, m_data, naddr;
  logic s_ctrl, s_exists, s_read, m_ctrl, m_write, m_full;
  logic [7:0] io_o, io_i, m0_o, m1_o;
  logic io_dir, ce1, ce2, cle, ale, we, re, wp, rb1, rb2, m0_drv, m1_drv;
  logic [5:0] cst; logic [15:0] cnt; logic [2:0] ncmd; logic [6:0] nst;
  logic ncl, ndl, ndone, nddone, nrb;
  int checks = 0, failures = 0, full_cycles = 0;

  // FIFO models
  logic [32:0] s_fifo[$];          // {control, data}
  logic [32:0] m_fifo[$];
  bit          throttle = 0;

  nand_fsl dut (
    .FSL_Clk(clk), .FSL_Rst(rst), .FSL_S_Data(s_data), .FSL_S_Control(s_ctrl),
    .FSL_S_Exists(s_exists), .FSL_S_Read(s_read), .FSL_M_Data(m_data),
    .FSL_M_Control(m_ctrl), .FSL_M_Write(m_write), .FSL_M_Full(m_full),
    .n_io_o(io_o), .n_io_i(io_i), .n_io_dir(io_dir), .n_ce1_l(ce1), .n_ce2_l(ce2),
    .n_cle(cle), .n_ale(ale), .n_we_l(we), .n_re_l(re), .n_wp_l(wp),
    .n_rb1_I(rb1), .n_rb2_I(rb2), .curr_state(cst), .count_q(cnt), .nCmd(ncmd),
    .nAddr(naddr), .nCmd_Loaded(ncl), .nData_Loaded(ndl), .nDone(ndone),
    .nData_Done(nddone), .nRB(nrb), .nCtl_State(nst));

  nand_flash_model #(.TR_NS(2000), .TPROG_NS(5000), .TBERS_NS(8000), .TRST_NS(1000)) die0 (
    .ce_n(ce1), .cle, .ale, .we_n(we), .re_n(re), .wp_n(wp), .io_i(io_o), .io_o(m0_o),
    .io_drive(m0_drv), .rb_n(rb1));
  nand_flash_model #(.TR_NS(2000), .TPROG_NS(5000), .TBERS_NS(8000), .TRST_NS(1000)) die1 (
    .ce_n(ce2), .cle, .ale, .we_n(we), .re_n(re), .wp_n(wp), .io_i(io_o), .io_o(m1_o),
    .io_drive(m1_drv), .rb_n(rb2));
  assign io_i = m0_drv ? m0_o : (m1_drv ? m1_o : 8'hFF);

  always #5 clk = ~clk;

  // the slave FIFO outputs change only at falling edges; the design samples
  // them at rising edges
  always @(negedge clk) begin
    s_exists <= s_fifo.size() > 0;
    s_data   <= (s_fifo.size() > 0) ? s_fifo[0][31:0] : '0;
    s_ctrl   <= (s_fifo.size() > 0) ? s_fifo[0][32] : 1'b0;
  end

  always @(posedge clk) begin
    if (s_read && s_fifo.size() > 0) void'(s_fifo.pop_front());
    if (m_write) m_fifo.push_back({m_ctrl, m_data});
    if (m_full) full_cycles++;
  end
  always @(negedge clk) m_full <= throttle && ($urandom_range(0, 3) == 0);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  function automatic logic [31:0] mkaddr(input bit die, input int row, input int col);
    return {die, 18'(row), 13'(col)};
  endfunction

  task automatic send(input nand_cmd_e c, input logic [31:0] a, input int n,
                      input logic [7:0] bytes[$] = {});
    s_fifo.push_back({1'b1, 3'b0, 13'(n), 13'b0, c});
    s_fifo.push_back({1'b0, a});
    for (int k = 0; k < bytes.size(); k += 4) begin
      logic [31:0] w = '0;
      for (int j = 0; j < 4; j++) if (k + j < bytes.size()) w[8*j +: 8] = bytes[k + j];
      s_fifo.push_back({1'b0, w});
    end
  endtask

  // Wait for the completion word; return data words before it as bytes.
  task automatic receive(input int n, output logic [7:0] bytes[$], output logic [31:0] compl);
    int guard = 0;
    bytes = {};
    compl = '0;
    forever begin
      while (m_fifo.size() == 0 && guard < 1000000) begin @(negedge clk); guard++; end
      if (guard >= 1000000) begin failures++; $display("FAIL no response"); return; end
      begin
        logic [32:0] w = m_fifo.pop_front();
        if (w[32]) begin compl = w[31:0]; break; end
        for (int j = 0; j < 4; j++) if (bytes.size() < n) bytes.push_back(w[8*j +: 8]);
      end
    end
  endtask

  initial begin
    logic [7:0] page[$], rd[$], short_data[$];
    logic [31:0] compl;
    int mism;
    m_full = 0;
    repeat (4) @(negedge clk);
    rst = 0;

    // a stray data word before the first header must be dropped
    s_fifo.push_back({1'b0, 32'hDEADBEEF});
    send(NAND_RESET, mkaddr(0, 0, 0), 0);
    receive(0, rd, compl);
    check("reset completion", compl[10:8], 3'(NAND_RESET));
    send(NAND_RESET, mkaddr(1, 0, 0), 0);
    receive(0, rd, compl);
    check("resets seen by flash", die0.n_resets + die1.n_resets, 2);

    for (int i = 0; i < 4096; i++) page.push_back(8'($urandom));
    send(NAND_PROGRAM_PAGE, mkaddr(0, 130, 0), 4096, page);
    receive(0, rd, compl);
    check("program completion", compl[10:0], {3'(NAND_PROGRAM_PAGE), 8'hE0});

    throttle = 1;
    send(NAND_READ_PAGE, mkaddr(0, 130, 0), 4096);
    receive(4096, rd, compl);
    check("read length", rd.size(), 4096);
    mism = 0;
    foreach (rd[i]) if (rd[i] != page[i]) mism++;
    check("4 KB page read back", mism, 0);
    check("read completion", compl[10:8], 3'(NAND_READ_PAGE));
    throttle = 0;

    // odd length on the second die
    for (int i = 0; i < 7; i++) short_data.push_back(8'(8'hA0 + i));
    send(NAND_PROGRAM_PAGE, mkaddr(1, 3, 8), 7, short_data);
    receive(0, rd, compl);
    send(NAND_READ_PAGE, mkaddr(1, 3, 6), 10);
    receive(10, rd, compl);
    check("odd read length", rd.size(), 10);
    check("byte before written area", rd[0], 8'hFF);
    check("first written byte", rd[2], 8'hA0);
    check("last written byte", rd[8], 8'hA6);
    check("byte after written area", rd[9], 8'hFF);

    send(NAND_ERASE_BLOCK, mkaddr(0, 130, 0), 0);
    receive(0, rd, compl);
    check("erase completion", compl[10:0], {3'(NAND_ERASE_BLOCK), 8'hE0});
    send(NAND_READ_PAGE, mkaddr(0, 130, 0), 8);
    receive(8, rd, compl);
    mism = 0;
    foreach (rd[i]) if (rd[i] != 8'hFF) mism++;
    check("erased page", mism, 0);

    send(NAND_READ_STATUS, mkaddr(0, 0, 0), 0);
    receive(0, rd, compl);
    check("status command", compl[10:0], {3'(NAND_READ_STATUS), 8'hE0});

    checks++;
    if (full_cycles == 0) begin failures++; $display("FAIL back-pressure never applied"); end
    check("flash timing violations", die0.violations + die1.violations, 0);
    check("peripheral idle", cst, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
