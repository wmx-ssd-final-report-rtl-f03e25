// tb_aes_decrypt_plb: drives the decryption peripheral the way the processor
// software does: key load (KEY_LOAD_READY / KEY_LOAD_DONE), then several
// ciphertext blocks (TEXT_LOAD_READY / TEXT_OUT_DONE) under that key, and
// checks the plaintext against known-answer vectors and the cycle counts of
// both phases.
module tb_aes_decrypt_plb;
  import wmx_pkg::*;
  logic clk = 0, rst = 1;
  logic [31:0] wdata, rdata;
  logic [3:0]  be;
  logic [AES_NUM_REGS-1:0] rdce, wrce;
  logic rdack, wrack, err;
  logic [2:0] st;
  int checks = 0, failures = 0;

  aes_decrypt_plb dut (
    .Bus2IP_Clk(clk), .Bus2IP_Reset(rst), .Bus2IP_Data(wdata), .Bus2IP_BE(be),
    .Bus2IP_RdCE(rdce), .Bus2IP_WrCE(wrce), .IP2Bus_Data(rdata), .IP2Bus_RdAck(rdack),
    .IP2Bus_WrAck(wrack), .IP2Bus_Error(err), .fsm_state(st));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int idx, input logic [31:0] d);
    @(negedge clk);
    wdata = d; be = 4'hf; wrce = '0; wrce[idx] = 1'b1;
    @(negedge clk);
    wrce = '0;
  endtask

  task automatic rd(input int idx, output logic [31:0] d);
    @(negedge clk);
    rdce = '0; rdce[idx] = 1'b1;
    #1 d = rdata;
    @(negedge clk);
    rdce = '0;
  endtask

  // Write CTRL and count cycles until it reads back the expected code.
  task automatic run_ctrl(input logic [31:0] code, input logic [31:0] done_code,
                          input int expect_cycles);
    int cycles = 0;
    wr(13, code);
    rdce = '0; rdce[13] = 1'b1;
    #1;
    while (rdata != done_code && cycles < 1000) begin @(negedge clk); #1; cycles++; end
    @(negedge clk); rdce = '0;
    checks++;
    if (cycles != expect_cycles) begin
      failures++;
      $display("FAIL CTRL %h -> %h took %0d cycles, expected %0d", code, done_code, cycles, expect_cycles);
    end
  endtask

  task automatic decrypt(input logic [127:0] ct, input logic [127:0] exp);
    logic [31:0] d;
    logic [127:0] pt;
    for (int i = 0; i < 4; i++) wr(4 + i, ct[32*i +: 32]);
    run_ctrl(CTRL_TEXT_LOAD_READY, CTRL_TEXT_OUT_DONE, 15);
    for (int i = 0; i < 4; i++) begin rd(8 + i, d); pt[32*i +: 32] = d; end
    checks++;
    if (pt !== exp) begin failures++; $display("FAIL pt=%h expected %h", pt, exp); end
  endtask

  task automatic load_key(input logic [127:0] k);
    for (int i = 0; i < 4; i++) wr(i, k[32*i +: 32]);
    run_ctrl(CTRL_KEY_LOAD_READY, CTRL_KEY_LOAD_DONE, 15);
  endtask

  initial begin
    wdata = '0; be = '0; rdce = '0; wrce = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    decrypt(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h00112233445566778899aabbccddeeff);
    load_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    decrypt(128'h3925841d02dc09fbdc118597196a0b32, 128'h3243f6a8885a308d313198a2e0370734);
    decrypt(128'h3ad77bb40d7a3660a89ecaf32466ef97, 128'h6bc1bee22e409f96e93d7e117393172a);
    decrypt(128'h7b0c785e27e8ad3f8223207104725dd4, 128'hf69f2445df4f9b17ad2b417be66c3710);
    checks++;
    if (st != 3'd0) begin failures++; $display("FAIL FSM not back in START_STATE"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
