// aes_cipher_top: iterative AES-128 encryption core.
//
// A one-cycle pulse on ld captures key and text_in. The core then computes the
// initial AddRoundKey, the ten rounds one per clock, and generates each round
// key on the fly from the previous one. text_out is registered, and done pulses
// for one cycle on the 12th rising edge after the edge that sampled ld, which
// matches the twelve-cycle latency of the core the peripheral was built around.
// text_out keeps the last result until the next ld. An ld while a block is in
// progress is ignored.
//
// Ports: clk, rst (synchronous, active high), ld, key[127:0], text_in[127:0],
// text_out[127:0], done. Byte order is FIPS-197: byte 0 in bits [127:120].
// The port names are those of the core in the encryption block diagram; the
// internal structure (one round per clock, on-the-fly key schedule) is this
// design's choice.
module aes_cipher_top
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         ld,
  input  logic [127:0] key,
  input  logic [127:0] text_in,
  output logic [127:0] text_out,
  output logic         done
);

  block_t     state_q, rkey_q, key_in_q, text_in_q;
  logic [7:0] rcon_q;
  logic [3:0] step_q;   // 0 idle, 1 initial key add, 2..11 rounds 1..10, 12 output
  block_t     rkey_next;

  assign rkey_next = next_round_key(rkey_q, rcon_q);

  always_ff @(posedge clk) begin
    if (rst) begin
      step_q    <= '0;
      done      <= 1'b0;
      text_out  <= '0;
      state_q   <= '0;
      rkey_q    <= '0;
      key_in_q  <= '0;
      text_in_q <= '0;
      rcon_q    <= 8'h01;
    end else begin
      done <= 1'b0;
      if (step_q == 4'd0) begin
        if (ld) begin
          key_in_q  <= key;
          text_in_q <= text_in;
          step_q    <= 4'd1;
        end
      end else if (step_q == 4'd1) begin
        state_q <= text_in_q ^ key_in_q;
        rkey_q  <= key_in_q;
        rcon_q  <= 8'h01;
        step_q  <= 4'd2;
      end else if (step_q <= 4'd11) begin
        if (step_q == 4'd11)
          state_q <= shift_rows(sub_bytes(state_q)) ^ rkey_next;
        else
          state_q <= mix_columns(shift_rows(sub_bytes(state_q))) ^ rkey_next;
        rkey_q <= rkey_next;
        rcon_q <= xtime(rcon_q);
        step_q <= step_q + 4'd1;
      end else begin
        text_out <= state_q;
        done     <= 1'b1;
        step_q   <= 4'd0;
      end
    end
  end

endmodule
