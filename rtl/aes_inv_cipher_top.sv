// aes_inv_cipher_top: iterative AES-128 decryption core with a stored key
// schedule.
//
// Decryption uses the round keys in reverse, so the key must be expanded
// before the first ciphertext block. A pulse on kld captures key; the core
// then derives round keys 1..10, one per clock, into an 11-entry register
// array, and kdone pulses on the 12th rising edge after the edge that sampled
// kld. A pulse on ld then captures text_in; the core applies round key 10,
// nine inverse rounds and the final inverse round, one per clock, and done
// pulses on the 12th rising edge after the ld edge. A full key load plus one
// block therefore takes 24 cycles, with ld given 12 cycles after kld; further
// blocks under the same key need only the 12 cycles of ld. text_out keeps the
// last result.
//
// Ports: clk, rst (synchronous, active high), kld, ld, key[127:0],
// text_in[127:0], text_out[127:0], kdone, done. Byte order is FIPS-197.
// The port names and the two 12-cycle phases follow the decryption block
// diagram and its timing description; giving ld before kdone is a usage error
// (checked by an assertion) and is ignored.
module aes_inv_cipher_top
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         kld,
  input  logic         ld,
  input  logic [127:0] key,
  input  logic [127:0] text_in,
  output logic [127:0] text_out,
  output logic         kdone,
  output logic         done
);

  block_t     rk_q [11];         // round keys 0..10
  logic [7:0] rcon_q;
  logic [3:0] kstep_q;           // 0 idle, 1..10 derive key i, 11 wait, 12 kdone
  logic       key_valid_q;
  block_t     state_q, text_in_q;
  logic [3:0] dstep_q;           // 0 idle, 1 add rk10, 2..11 inverse rounds 9..0, 12 output
  logic [3:0] round_idx;

  // Round key used by decryption step 2..11 (round 9 down to 0).
  assign round_idx = 4'd11 - dstep_q;

  // Key expansion.
  always_ff @(posedge clk) begin
    if (rst) begin
      kstep_q     <= '0;
      kdone       <= 1'b0;
      key_valid_q <= 1'b0;
      rcon_q      <= 8'h01;
      for (int i = 0; i < 11; i++) rk_q[i] <= '0;
    end else begin
      kdone <= 1'b0;
      if (kstep_q == 4'd0) begin
        if (kld && dstep_q == 4'd0) begin
          rk_q[0]     <= key;
          rcon_q      <= 8'h01;
          kstep_q     <= 4'd1;
          key_valid_q <= 1'b0;
        end
      end else if (kstep_q <= 4'd10) begin
        rk_q[kstep_q] <= next_round_key(rk_q[kstep_q - 4'd1], rcon_q);
        rcon_q        <= xtime(rcon_q);
        kstep_q       <= kstep_q + 4'd1;
      end else if (kstep_q == 4'd11) begin
        kstep_q <= 4'd12;
      end else begin
        kdone       <= 1'b1;
        key_valid_q <= 1'b1;
        kstep_q     <= 4'd0;
      end
    end
  end

  // Decryption.
  always_ff @(posedge clk) begin
    if (rst) begin
      dstep_q   <= '0;
      done      <= 1'b0;
      text_out  <= '0;
      state_q   <= '0;
      text_in_q <= '0;
    end else begin
      done <= 1'b0;
      if (dstep_q == 4'd0) begin
        if (ld && key_valid_q && kstep_q == 4'd0) begin
          text_in_q <= text_in;
          dstep_q   <= 4'd1;
        end
      end else if (dstep_q == 4'd1) begin
        state_q <= text_in_q ^ rk_q[10];
        dstep_q <= 4'd2;
      end else if (dstep_q <= 4'd10) begin
        state_q <= inv_mix_columns(inv_sub_bytes(inv_shift_rows(state_q)) ^ rk_q[round_idx]);
        dstep_q <= dstep_q + 4'd1;
      end else if (dstep_q == 4'd11) begin
        state_q <= inv_sub_bytes(inv_shift_rows(state_q)) ^ rk_q[0];
        dstep_q <= 4'd12;
      end else begin
        text_out <= state_q;
        done     <= 1'b1;
        dstep_q  <= 4'd0;
      end
    end
  end

  // The ciphertext may only be loaded once the key schedule is complete.
  a_ld_after_key : assert property (@(posedge clk) disable iff (rst)
                                     ld |-> (key_valid_q && kstep_q == 4'd0) || dstep_q != 4'd0)
    else $error("aes_inv_cipher_top: ld given before the key load finished");

endmodule
