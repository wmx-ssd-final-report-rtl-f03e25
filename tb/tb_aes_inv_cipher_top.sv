// tb_aes_inv_cipher_top: checks the AES-128 decryption core against published
// known-answer vectors, the 12-cycle key load (kld to kdone), the 12-cycle
// block decryption (ld to done), and several blocks decrypted under one key
// load without reloading it.
module tb_aes_inv_cipher_top;
  logic clk = 0, rst = 1, kld = 0, ld = 0, kdone, done;
  logic [127:0] key, text_in, text_out;
  int checks = 0, failures = 0;

  aes_inv_cipher_top dut (.clk, .rst, .kld, .ld, .key, .text_in, .text_out, .kdone, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_key(input logic [127:0] k);
    int cycles;
    @(negedge clk);
    key = k; kld = 1;
    @(negedge clk);
    kld = 0; key = '0;
    cycles = 0;  // rising edges since the one that sampled the load
    while (!kdone && cycles < 100) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 12) begin failures++; $display("FAIL key load took %0d cycles", cycles); end
  endtask

  task automatic decrypt(input logic [127:0] ct, input logic [127:0] expect_pt);
    int cycles;
    @(negedge clk);
    text_in = ct; ld = 1;
    @(negedge clk);
    ld = 0; text_in = '0;
    cycles = 0;  // rising edges since the one that sampled the load
    while (!done && cycles < 100) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 12) begin failures++; $display("FAIL decrypt took %0d cycles", cycles); end
    checks++;
    if (text_out !== expect_pt) begin
      failures++;
      $display("FAIL pt=%h expected %h", text_out, expect_pt);
    end
  endtask

  initial begin
    key = '0; text_in = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    decrypt(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h00112233445566778899aabbccddeeff);
    load_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    decrypt(128'h3925841d02dc09fbdc118597196a0b32, 128'h3243f6a8885a308d313198a2e0370734);
    decrypt(128'h3ad77bb40d7a3660a89ecaf32466ef97, 128'h6bc1bee22e409f96e93d7e117393172a);
    decrypt(128'hf5d3d58503b9699de785895a96fdbaaf, 128'hae2d8a571e03ac9c9eb76fac45af8e51);
    decrypt(128'h43b1cd7f598ece23881b00e3ed030688, 128'h30c81c46a35ce411e5fbc1191a0a52ef);
    decrypt(128'h7b0c785e27e8ad3f8223207104725dd4, 128'hf69f2445df4f9b17ad2b417be66c3710);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
