// tb_aes_encrypt_plb: drives the encryption peripheral the way the processor
// software does (write key, write text, write CTRL = 0x2, poll CTRL for 0x1,
// read the ciphertext) and checks the result against known-answer vectors,
// the number of cycles from start to done, byte-enable writes and the
// scratch register.
module tb_aes_encrypt_plb;
  import wmx_pkg::*;
  logic clk = 0, rst = 1;
  logic [31:0] wdata, rdata;
  logic [3:0]  be;
  logic [AES_NUM_REGS-1:0] rdce, wrce;
  logic rdack, wrack, err;
  logic [1:0] st;
  int checks = 0, failures = 0;

  aes_encrypt_plb dut (
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

  task automatic wr(input int idx, input logic [31:0] d, input logic [3:0] b = 4'hf);
    @(negedge clk);
    wdata = d; be = b; wrce = '0; wrce[idx] = 1'b1;
    @(negedge clk);
    wrce = '0;
  endtask

  task automatic rd(input int idx, output logic [31:0] d);
    @(negedge clk);
    rdce = '0; rdce[idx] = 1'b1;
    #1 d = rdata;
    if (!rdack) begin failures++; $display("FAIL no read ack"); end
    @(negedge clk);
    rdce = '0;
  endtask

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  task automatic encrypt(input logic [127:0] k, input logic [127:0] pt, input logic [127:0] exp);
    logic [31:0] d;
    logic [127:0] ct;
    int cycles;
    for (int i = 0; i < 4; i++) wr(i, k[32*i +: 32]);
    for (int i = 0; i < 4; i++) wr(4 + i, pt[32*i +: 32]);
    wr(13, CTRL_ENC_START);
    // count cycles until CTRL reads back done, sampling it each cycle
    cycles = 0;
    rdce = '0; rdce[13] = 1'b1;
    #1;
    while (rdata != CTRL_ENC_DONE && cycles < 1000) begin
      @(negedge clk); #1; cycles++;
    end
    @(negedge clk); rdce = '0;
    checks++;
    if (cycles != 15) begin failures++; $display("FAIL start-to-done %0d cycles, expected 15", cycles); end
    for (int i = 0; i < 4; i++) begin rd(8 + i, d); ct[32*i +: 32] = d; end
    check("ciphertext", ct, exp);
  endtask

  initial begin
    logic [31:0] d;
    wdata = '0; be = '0; rdce = '0; wrce = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    // Key and text words are written least significant word first.
    encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
            128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h6bc1bee22e409f96e93d7e117393172a,
            128'h3ad77bb40d7a3660a89ecaf32466ef97);
    // a second run without rewriting the key
    for (int i = 0; i < 4; i++) wr(4 + i, 128'hae2d8a571e03ac9c9eb76fac45af8e51 >> (32*i));
    wr(13, CTRL_ENC_START);
    repeat (20) @(negedge clk);
    begin
      logic [127:0] ct;
      for (int i = 0; i < 4; i++) begin rd(8 + i, d); ct[32*i +: 32] = d; end
      check("ciphertext, key kept", ct, 128'hf5d3d58503b9699de785895a96fdbaaf);
    end
    rd(13, d);
    check("CTRL after done", {96'h0, d}, {96'h0, CTRL_ENC_DONE});
    // byte enables and the scratch register
    wr(12, 32'h11223344);
    wr(12, 32'hAABBCCDD, 4'b0101);
    rd(12, d);
    check("byte-enable write", {96'h0, d}, {96'h0, 32'h11BB33DD});
    // result registers are read-only
    wr(8, 32'hFFFFFFFF);
    rd(8, d);
    check("read-only result", {96'h0, d}, {96'h0, 32'h96fdbaaf});
    checks++;
    if (st != 2'b00) begin failures++; $display("FAIL FSM not back in START_STATE"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
