// tb_ssd_capacity: address-range workload for the SSD hardware at its default
// size. Every die of every package (4 packages x 2 dies) receives a distinct
// 4 KB page at its first page (row 0) and at its last page (row 2^18 - 1),
// written through that package's FSL channel; all sixteen pages are then read
// back and compared. This covers the whole 8 GB address space
// (4 packages x 2 dies x 2^18 pages x 4 KB) and shows that no two pages alias.
// The programs of the four packages run concurrently.
module tb_ssd_capacity;
  import wmx_pkg::*;
  localparam int NC = 4;
  localparam int LAST_ROW = (1 << 18) - 1;

  logic clk = 0, rst = 1;
  logic [31:0] b_wdata [2], b_rdata [2];
  logic [3:0]  b_be    [2];
  logic [AES_NUM_REGS-1:0] b_rdce [2], b_wrce [2];
  logic        b_rdack [2], b_wrack [2], b_err [2];
  logic [1:0]  enc_state;
  logic [2:0]  dec_state;
  logic [31:0] s_data [NC], m_data [NC];
  logic [NC-1:0] s_ctrl, s_exists, s_read, m_ctrl, m_write, m_full;
  logic [7:0]  io_o [NC], io_i [NC];
  logic [NC-1:0] io_dir, ce_n, ce2_n, cle, ale, we_n, re_n, wp_n, rb_n, rb2_n;
  logic [5:0]  nstate [NC];
  int checks = 0, failures = 0;

  wmx_ssd_top dut (
    .clk, .rst,
    .enc_Bus2IP_Data(b_wdata[0]), .enc_Bus2IP_BE(b_be[0]), .enc_Bus2IP_RdCE(b_rdce[0]),
    .enc_Bus2IP_WrCE(b_wrce[0]), .enc_IP2Bus_Data(b_rdata[0]), .enc_IP2Bus_RdAck(b_rdack[0]),
    .enc_IP2Bus_WrAck(b_wrack[0]), .enc_IP2Bus_Error(b_err[0]),
    .dec_Bus2IP_Data(b_wdata[1]), .dec_Bus2IP_BE(b_be[1]), .dec_Bus2IP_RdCE(b_rdce[1]),
    .dec_Bus2IP_WrCE(b_wrce[1]), .dec_IP2Bus_Data(b_rdata[1]), .dec_IP2Bus_RdAck(b_rdack[1]),
    .dec_IP2Bus_WrAck(b_wrack[1]), .dec_IP2Bus_Error(b_err[1]),
    .fsl_s_data(s_data), .fsl_s_control(s_ctrl), .fsl_s_exists(s_exists), .fsl_s_read(s_read),
    .fsl_m_data(m_data), .fsl_m_control(m_ctrl), .fsl_m_write(m_write), .fsl_m_full(m_full),
    .nand_io_o(io_o), .nand_io_i(io_i), .nand_io_dir(io_dir), .nand_ce_n(ce_n),
    .nand_ce2_n(ce2_n), .nand_cle(cle), .nand_ale(ale), .nand_we_n(we_n), .nand_re_n(re_n),
    .nand_wp_n(wp_n), .nand_rb_n(rb_n), .nand_rb2_n(rb2_n),
    .enc_state, .dec_state, .nand_state(nstate));

  logic [7:0] d_o [NC][2];
  logic       d_drv [NC][2];
  for (genvar c = 0; c < NC; c++) begin : g_flash
    nand_flash_model die0 (.ce_n(ce_n[c]), .cle(cle[c]), .ale(ale[c]), .we_n(we_n[c]),
      .re_n(re_n[c]), .wp_n(wp_n[c]), .io_i(io_o[c]), .io_o(d_o[c][0]), .io_drive(d_drv[c][0]),
      .rb_n(rb_n[c]));
    nand_flash_model die1 (.ce_n(ce2_n[c]), .cle(cle[c]), .ale(ale[c]), .we_n(we_n[c]),
      .re_n(re_n[c]), .wp_n(wp_n[c]), .io_i(io_o[c]), .io_o(d_o[c][1]), .io_drive(d_drv[c][1]),
      .rb_n(rb2_n[c]));
    assign io_i[c] = d_drv[c][0] ? d_o[c][0] : (d_drv[c][1] ? d_o[c][1] : 8'hFF);
  end

  always #5 clk = ~clk;

  logic [32:0] s_fifo [NC][$];
  logic [32:0] m_fifo [NC][$];

  always @(negedge clk)
    for (int c = 0; c < NC; c++) begin
      s_exists[c] <= s_fifo[c].size() > 0;
      s_data[c]   <= (s_fifo[c].size() > 0) ? s_fifo[c][0][31:0] : '0;
      s_ctrl[c]   <= (s_fifo[c].size() > 0) ? s_fifo[c][0][32] : 1'b0;
      m_full[c]   <= 1'b0;
    end

  always @(posedge clk)
    for (int c = 0; c < NC; c++) begin
      if (s_read[c] && s_fifo[c].size() > 0) void'(s_fifo[c].pop_front());
      if (m_write[c]) m_fifo[c].push_back({m_ctrl[c], m_data[c]});
    end

  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] mkaddr(input bit die, input int row, input int col);
    return {die, 18'(row), 13'(col)};
  endfunction

  // Content of the page of package c, die d, row r: a byte pattern unique to
  // the page.
  function automatic logic [7:0] pattern(input int c, input int d, input int r, input int i);
    return 8'((i * 13) ^ (i >> 8) ^ (c * 64 + d * 32 + (r == 0 ? 0 : 16)) ^ 8'h5A);
  endfunction

  task automatic nand_send(input int c, input nand_cmd_e cmd, input logic [31:0] a, input int n,
                           input logic [7:0] bytes[$] = {});
    s_fifo[c].push_back({1'b1, 3'b0, 13'(n), 13'b0, cmd});
    s_fifo[c].push_back({1'b0, a});
    for (int k = 0; k < bytes.size(); k += 4) begin
      logic [31:0] w = '0;
      for (int j = 0; j < 4; j++) if (k + j < bytes.size()) w[8*j +: 8] = bytes[k + j];
      s_fifo[c].push_back({1'b0, w});
    end
  endtask

  task automatic nand_receive(input int c, input int n, output logic [7:0] bytes[$],
                              output logic [31:0] compl);
    int guard = 0;
    bytes = {};
    compl = '0;
    forever begin
      while (m_fifo[c].size() == 0 && guard < 4000000) begin @(negedge clk); guard++; end
      if (guard >= 4000000) begin failures++; $display("FAIL no response from package %0d", c); return; end
      begin
        logic [32:0] w = m_fifo[c].pop_front();
        if (w[32]) begin compl = w[31:0]; break; end
        for (int j = 0; j < 4; j++) if (bytes.size() < n) bytes.push_back(w[8*j +: 8]);
      end
    end
  endtask

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  // All work of one package: reset both dies, program four pages, read them.
  task automatic package_run(input int c);
    logic [7:0]  page[$], rd[$];
    logic [31:0] compl;
    int rows[2] = '{0, LAST_ROW};
    for (int d = 0; d < 2; d++) begin
      nand_send(c, NAND_RESET, mkaddr(d[0], 0, 0), 0);
      nand_receive(c, 0, rd, compl);
    end
    for (int d = 0; d < 2; d++)
      for (int k = 0; k < 2; k++) begin
        page = {};
        for (int i = 0; i < 4096; i++) page.push_back(pattern(c, d, rows[k], i));
        nand_send(c, NAND_PROGRAM_PAGE, mkaddr(d[0], rows[k], 0), 4096, page);
        nand_receive(c, 0, rd, compl);
        check($sformatf("program p%0d d%0d row %0d", c, d, rows[k]), compl[7:0], 8'hE0);
      end
    for (int d = 0; d < 2; d++)
      for (int k = 0; k < 2; k++) begin
        int mism = 0;
        nand_send(c, NAND_READ_PAGE, mkaddr(d[0], rows[k], 0), 4096);
        nand_receive(c, 4096, rd, compl);
        foreach (rd[i]) if (rd[i] != pattern(c, d, rows[k], i)) mism++;
        check($sformatf("read p%0d d%0d row %0d", c, d, rows[k]), mism, 0);
      end
  endtask

  initial begin
    for (int p = 0; p < 2; p++) begin
      b_wdata[p] = '0; b_be[p] = '0; b_rdce[p] = '0; b_wrce[p] = '0;
    end
    repeat (4) @(negedge clk);
    rst = 0;
    fork
      package_run(0);
      package_run(1);
      package_run(2);
      package_run(3);
    join
    begin
      int viol, progs;
      viol = g_flash[0].die0.violations + g_flash[0].die1.violations +
             g_flash[1].die0.violations + g_flash[1].die1.violations +
             g_flash[2].die0.violations + g_flash[2].die1.violations +
             g_flash[3].die0.violations + g_flash[3].die1.violations;
      progs = g_flash[0].die0.n_programs + g_flash[0].die1.n_programs +
              g_flash[1].die0.n_programs + g_flash[1].die1.n_programs +
              g_flash[2].die0.n_programs + g_flash[2].die1.n_programs +
              g_flash[3].die0.n_programs + g_flash[3].die1.n_programs;
      check("flash timing violations", viol, 0);
      check("pages programmed", progs, 16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
