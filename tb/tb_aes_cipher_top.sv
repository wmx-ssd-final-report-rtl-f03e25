// tb_aes_cipher_top: checks the AES-128 encryption core against published
// known-answer vectors (FIPS-197 appendices B and C.1, SP 800-38A ECB-AES128)
// and checks that done follows ld by exactly 12 clock cycles.
module tb_aes_cipher_top;
  logic clk = 0, rst = 1, ld = 0, done;
  logic [127:0] key, text_in, text_out;
  int checks = 0, failures = 0;

  aes_cipher_top dut (.clk, .rst, .ld, .key, .text_in, .text_out, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic encrypt(input logic [127:0] k, input logic [127:0] pt,
                         input logic [127:0] expect_ct);
    int cycles = 0;
    @(negedge clk);
    key = k; text_in = pt; ld = 1;
    @(negedge clk);
    ld = 0;
    key = '0; text_in = '0;   // the core must have captured its inputs
    cycles = 0;  // rising edges since the one that sampled the load
    while (!done) begin
      @(negedge clk);
      cycles++;
      if (cycles > 100) break;
    end
    checks++;
    if (text_out !== expect_ct) begin
      failures++;
      $display("FAIL ct=%h expected %h", text_out, expect_ct);
    end
    checks++;
    if (cycles != 12) begin
      failures++;
      $display("FAIL latency %0d cycles, expected 12", cycles);
    end
  endtask

  initial begin
    key = '0; text_in = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
            128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
            128'h3925841d02dc09fbdc118597196a0b32);
    encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h6bc1bee22e409f96e93d7e117393172a,
            128'h3ad77bb40d7a3660a89ecaf32466ef97);
    encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
            128'hf5d3d58503b9699de785895a96fdbaaf);
    encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h30c81c46a35ce411e5fbc1191a0a52ef,
            128'h43b1cd7f598ece23881b00e3ed030688);
    encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'hf69f2445df4f9b17ad2b417be66c3710,
            128'h7b0c785e27e8ad3f8223207104725dd4);
    // done is a single-cycle pulse
    @(negedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL done held high"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
