// tb_wmx_ssd_top: end-to-end run of the SSD hardware at its default size
// (four flash packages, two dies each, 4 KB pages), with the testbench in the
// role of the processor firmware and eight behavioural flash dies.
//
// Flow, for one 4 KB block of data:
//   1. RESET every die of every package and read its status.
//   2. Encrypt the block, 16 bytes at a time, through the encryption
//      peripheral (key written once, text and CTRL per AES block).
//   3. Program the ciphertext into a page on the second die of package 2
//      while package 1 programs a page of its own, so two controllers work
//      at once.
//   4. Load the key into the decryption peripheral once, read the page back
//      and decrypt all 256 AES blocks under that one key load.
//   5. Compare with the original data; also check the ciphertext differs
//      from the plaintext and matches a known-answer block.
//   6. Erase the block on package 1 and check the page reads back as FFh.
// Each mechanism (reset, status read, program, read, erase, ready/busy wait,
// second-die select, encryption, key load, decryption under a kept key, FSL
// back-pressure, two packages busy together) is counted, and one that never
// happened is a failure.
module tb_wmx_ssd_top;
  import wmx_pkg::*;
  localparam int NC = 4;

  logic clk = 0, rst = 1;
  // bus attachments, index 0 = encryption, 1 = decryption
  logic [31:0] b_wdata [2], b_rdata [2];
  logic [3:0]  b_be    [2];
  logic [AES_NUM_REGS-1:0] b_rdce [2], b_wrce [2];
  logic        b_rdack [2], b_wrack [2], b_err [2];
  logic [1:0]  enc_state;
  logic [2:0]  dec_state;
  // FSL
  logic [31:0] s_data [NC], m_data [NC];
  logic [NC-1:0] s_ctrl, s_exists, s_read, m_ctrl, m_write, m_full;
  // flash pins
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

  // eight flash dies
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

  // ---------------------------------------------------------------- FSL FIFOs
  logic [32:0] s_fifo [NC][$];
  logic [32:0] m_fifo [NC][$];
  bit          throttle = 0;

  always @(negedge clk)
    for (int c = 0; c < NC; c++) begin
      s_exists[c] <= s_fifo[c].size() > 0;
      s_data[c]   <= (s_fifo[c].size() > 0) ? s_fifo[c][0][31:0] : '0;
      s_ctrl[c]   <= (s_fifo[c].size() > 0) ? s_fifo[c][0][32] : 1'b0;
      m_full[c]   <= throttle && ($urandom_range(0, 3) == 0);
    end

  always @(posedge clk)
    for (int c = 0; c < NC; c++) begin
      if (s_read[c] && s_fifo[c].size() > 0) void'(s_fifo[c].pop_front());
      if (m_write[c]) m_fifo[c].push_back({m_ctrl[c], m_data[c]});
    end

  // ---------------------------------------------------------------- event counters
  int n_busy = 0, n_ce2 = 0, n_full = 0, n_parallel = 0, n_enc = 0, n_keyload = 0, n_dec = 0;
  int max_dec_per_key = 0, dec_since_key = 0;
  always @(posedge clk) begin
    int busy_pk;
    busy_pk = 0;
    for (int c = 0; c < NC; c++) begin
      if (!rb_n[c] || !rb2_n[c]) busy_pk++;
      if (!ce2_n[c]) n_ce2++;
      if (m_full[c]) n_full++;
    end
    if (busy_pk > 0) n_busy++;
    if (busy_pk > 1) n_parallel++;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  // ---------------------------------------------------------------- bus tasks
  task automatic bus_wr(input int p, input int idx, input logic [31:0] d);
    @(negedge clk);
    b_wdata[p] = d; b_be[p] = 4'hf; b_wrce[p] = '0; b_wrce[p][idx] = 1'b1;
    @(negedge clk);
    b_wrce[p] = '0;
  endtask

  task automatic bus_rd(input int p, input int idx, output logic [31:0] d);
    @(negedge clk);
    b_rdce[p] = '0; b_rdce[p][idx] = 1'b1;
    #1 d = b_rdata[p];
    @(negedge clk);
    b_rdce[p] = '0;
  endtask

  task automatic poll_ctrl(input int p, input logic [31:0] code);
    logic [31:0] d;
    int guard = 0;
    do begin bus_rd(p, 13, d); guard++; end while (d != code && guard < 1000);
    if (guard >= 1000) begin failures++; $display("FAIL CTRL never reached %h", code); end
  endtask

  task automatic aes_encrypt(input logic [127:0] pt, output logic [127:0] ct);
    logic [31:0] d;
    for (int i = 0; i < 4; i++) bus_wr(0, 4 + i, pt[32*i +: 32]);
    bus_wr(0, 13, CTRL_ENC_START);
    poll_ctrl(0, CTRL_ENC_DONE);
    for (int i = 0; i < 4; i++) begin bus_rd(0, 8 + i, d); ct[32*i +: 32] = d; end
    n_enc++;
  endtask

  task automatic aes_load_key(input int p, input logic [127:0] k);
    for (int i = 0; i < 4; i++) bus_wr(p, i, k[32*i +: 32]);
    if (p == 1) begin
      bus_wr(1, 13, CTRL_KEY_LOAD_READY);
      poll_ctrl(1, CTRL_KEY_LOAD_DONE);
      n_keyload++;
      dec_since_key = 0;
    end
  endtask

  task automatic aes_decrypt(input logic [127:0] ct, output logic [127:0] pt);
    logic [31:0] d;
    for (int i = 0; i < 4; i++) bus_wr(1, 4 + i, ct[32*i +: 32]);
    bus_wr(1, 13, CTRL_TEXT_LOAD_READY);
    poll_ctrl(1, CTRL_TEXT_OUT_DONE);
    for (int i = 0; i < 4; i++) begin bus_rd(1, 8 + i, d); pt[32*i +: 32] = d; end
    n_dec++;
    dec_since_key++;
    if (dec_since_key > max_dec_per_key) max_dec_per_key = dec_since_key;
  endtask

  // ---------------------------------------------------------------- FSL tasks
  function automatic logic [31:0] mkaddr(input bit die, input int row, input int col);
    return {die, 18'(row), 13'(col)};
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
      while (m_fifo[c].size() == 0 && guard < 2000000) begin @(negedge clk); guard++; end
      if (guard >= 2000000) begin failures++; $display("FAIL no response from package %0d", c); return; end
      begin
        logic [32:0] w = m_fifo[c].pop_front();
        if (w[32]) begin compl = w[31:0]; break; end
        for (int j = 0; j < 4; j++) if (bytes.size() < n) bytes.push_back(w[8*j +: 8]);
      end
    end
  endtask

  // ---------------------------------------------------------------- scenario
  localparam logic [127:0] KEY = 128'h2b7e151628aed2a6abf7158809cf4f3c;

  initial begin
    logic [7:0]   plain[$], cipher[$], rd[$], other[$];
    logic [31:0]  compl;
    logic [127:0] blk, res;
    int mism, same;
    int n_reset = 0, n_status = 0, n_prog = 0, n_read = 0, n_erase = 0;

    for (int p = 0; p < 2; p++) begin
      b_wdata[p] = '0; b_be[p] = '0; b_rdce[p] = '0; b_wrce[p] = '0;
    end
    repeat (4) @(negedge clk);
    rst = 0;

    // 1. reset and status of every die
    for (int c = 0; c < NC; c++)
      for (int d = 0; d < 2; d++) begin
        nand_send(c, NAND_RESET, mkaddr(d[0], 0, 0), 0);
        nand_receive(c, 0, rd, compl);
        n_reset++;
        nand_send(c, NAND_READ_STATUS, mkaddr(d[0], 0, 0), 0);
        nand_receive(c, 0, rd, compl);
        check($sformatf("status package %0d die %0d", c, d), compl[7:0], 8'hE0);
        n_status++;
      end

    // known-answer block through the encryption peripheral
    aes_load_key(0, KEY);
    aes_encrypt(128'h6bc1bee22e409f96e93d7e117393172a, res);
    check("encryption known answer", res[63:0], 64'ha89ecaf32466ef97);
    check("encryption known answer (high)", res[127:64], 64'h3ad77bb40d7a3660);

    // 2. encrypt a 4 KB block
    for (int i = 0; i < 4096; i++) plain.push_back(8'($urandom));
    for (int b = 0; b < 256; b++) begin
      for (int j = 0; j < 16; j++) blk[127 - 8*j -: 8] = plain[16*b + j];
      aes_encrypt(blk, res);
      for (int j = 0; j < 16; j++) cipher.push_back(res[127 - 8*j -: 8]);
    end
    same = 0;
    foreach (plain[i]) if (plain[i] == cipher[i]) same++;
    checks++;
    if (same > 64) begin failures++; $display("FAIL ciphertext resembles plaintext (%0d)", same); end

    // 3. program the ciphertext (package 2, die 1) while package 1 programs too
    for (int i = 0; i < 4096; i++) other.push_back(8'(i));
    throttle = 1;
    nand_send(2, NAND_PROGRAM_PAGE, mkaddr(1, 1000, 0), 4096, cipher);
    nand_send(1, NAND_PROGRAM_PAGE, mkaddr(0, 64, 0), 4096, other);
    nand_receive(2, 0, rd, compl);
    check("program status package 2", compl[7:0], 8'hE0);
    nand_receive(1, 0, rd, compl);
    check("program status package 1", compl[7:0], 8'hE0);
    n_prog += 2;

    // 4. read back and decrypt under one key load
    nand_send(2, NAND_READ_PAGE, mkaddr(1, 1000, 0), 4096);
    nand_receive(2, 4096, rd, compl);
    n_read++;
    throttle = 0;
    check("read length", rd.size(), 4096);
    mism = 0;
    foreach (rd[i]) if (rd[i] != cipher[i]) mism++;
    check("ciphertext read from flash", mism, 0);
    aes_load_key(1, KEY);
    mism = 0;
    for (int b = 0; b < 256; b++) begin
      for (int j = 0; j < 16; j++) blk[127 - 8*j -: 8] = rd[16*b + j];
      aes_decrypt(blk, res);
      for (int j = 0; j < 16; j++) if (res[127 - 8*j -: 8] != plain[16*b + j]) mism++;
    end
    // 5. end-to-end comparison
    check("decrypted block equals original", mism, 0);

    // 6. erase on package 1 and read the page as FFh
    nand_send(1, NAND_READ_PAGE, mkaddr(0, 64, 0), 4096);
    nand_receive(1, 4096, rd, compl);
    n_read++;
    mism = 0;
    foreach (rd[i]) if (rd[i] != other[i]) mism++;
    check("package 1 page", mism, 0);
    nand_send(1, NAND_ERASE_BLOCK, mkaddr(0, 64, 0), 0);
    nand_receive(1, 0, rd, compl);
    check("erase status", compl[7:0], 8'hE0);
    n_erase++;
    nand_send(1, NAND_READ_PAGE, mkaddr(0, 64, 0), 32);
    nand_receive(1, 32, rd, compl);
    n_read++;
    mism = 0;
    foreach (rd[i]) if (rd[i] != 8'hFF) mism++;
    check("erased page", mism, 0);

    // flash side bookkeeping
    begin
      int viol = 0, progs = 0, erases = 0, resets = 0;
      viol += g_flash[0].die0.violations + g_flash[0].die1.violations;
      viol += g_flash[1].die0.violations + g_flash[1].die1.violations;
      viol += g_flash[2].die0.violations + g_flash[2].die1.violations;
      viol += g_flash[3].die0.violations + g_flash[3].die1.violations;
      resets = g_flash[0].die0.n_resets + g_flash[0].die1.n_resets + g_flash[1].die0.n_resets +
               g_flash[1].die1.n_resets + g_flash[2].die0.n_resets + g_flash[2].die1.n_resets +
               g_flash[3].die0.n_resets + g_flash[3].die1.n_resets;
      progs  = g_flash[1].die0.n_programs + g_flash[2].die1.n_programs;
      erases = g_flash[1].die0.n_erases;
      check("flash timing violations", viol, 0);
      check("resets seen by the dies", resets, 2 * NC);
      check("programs seen by the dies", progs, 2);
      check("erases seen by the dies", erases, 1);
    end

    // mechanisms
    begin
      string names[12] = '{"reset", "status read", "program", "read", "erase", "ready/busy wait",
                           "second-die select", "encryption", "key load", "decrypt with kept key",
                           "FSL back-pressure", "two packages busy together"};
      int counts[12];
      counts = '{n_reset, n_status, n_prog, n_read, n_erase, n_busy, n_ce2, n_enc, n_keyload,
                 max_dec_per_key - 1, n_full, n_parallel};
      for (int i = 0; i < 12; i++) begin
        $display("mechanism %-28s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] <= 0) begin failures++; $display("FAIL mechanism %s never happened", names[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
