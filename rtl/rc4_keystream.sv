// rc4_keystream: RC4 key scheduling and pseudo-random generation.
//
// Owns the S-box (rc4_sbox) and the registers of the RC4 datapath: the index
// counter i, j_register, si_register and t_register. S[j] is added straight
// from the S-box read port, so no separate sj register is kept. One adder
// chain serves both phases: j + mux + S[i], where the 2:1 multiplexer gives
// the key byte L[i mod KEY_LEN] during key setup and zero during generation.
// A second adder forms t = S[i] + S[j]. All index arithmetic is modulo M.
//
// Phases, started by a one-clock start pulse (a new pulse restarts at once):
//   INIT      S[i] = i for i = 0..M-1                       M clocks
//   KSA_J     j = j + S[i] + L[i mod KEY_LEN]               \ 2 clocks per i,
//   KSA_SWAP  swap S[i], S[j]; i = i + 1                    / M iterations
//   PRG_J     j = j + S[i]                                  \
//   PRG_SWAP  swap S[i], S[j]; t = S[i] + S[j]               | 3 clocks per
//   PRG_OUT   K = S[t]; i = i + 1                           /  byte
//   PRG_HOLD  K waits (ks_valid high) until ks_take
// Key setup therefore takes 3*M clocks after start, and a key-stream byte
// follows at best every 4 clocks (3 to make it, 1 to hand it over).
// The key index counter kidx (4 bits for the default 16-byte key) counts
// i mod KEY_LEN and addresses the key box through key_idx/key_byte.
//
// Interface: ks/ks_valid/ks_take is a valid-ready pair; sched_busy is high
// from start until the first generation step. Synchronous active-low reset.
//
// The algorithm, the register names and the shared adder/multiplexer datapath
// follow the published design. The phase timing, the one-clock swap and the
// handshake are this design's own choices.
module rc4_keystream
  import dks_pkg::*;
#(
  parameter int unsigned M       = 256,
  parameter int unsigned KEY_LEN = 16,
  localparam int unsigned AW = $clog2(M),
  localparam int unsigned KW = (KEY_LEN > 1) ? $clog2(KEY_LEN) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic [KW-1:0] key_idx,
  input  byte_t         key_byte,
  output byte_t         ks,
  output logic          ks_valid,
  input  logic          ks_take,
  output logic          sched_busy
);

  rc4_state_e    state;
  logic [AW-1:0] i, j, t;
  byte_t         si_reg;
  logic [KW-1:0] kidx;
  byte_t         si, sj, st;
  byte_t         mux_out, add1, add2, add_t;
  logic          init_we, swap_we;

  assign key_idx = kidx;

  // Shared datapath: 2:1 multiplexer and the two adders feeding j_register,
  // and the adder feeding t_register.
  assign mux_out = (state == RC4_KSA_J) ? key_byte : '0;
  assign add1    = BYTE_W'(j) + mux_out;
  assign add2    = add1 + si;
  assign add_t   = si_reg + sj;

  assign init_we = (state == RC4_INIT);
  assign swap_we = (state == RC4_KSA_SWAP) || (state == RC4_PRG_SWAP);

  rc4_sbox #(.M(M)) u_sbox (
    .clk,
    .init_we,
    .init_addr(i),
    .swap_we,
    .addr_i(i),
    .addr_j(j),
    .addr_t(t),
    .si, .sj, .st
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= RC4_IDLE;
      i        <= '0;
      j        <= '0;
      t        <= '0;
      si_reg   <= '0;
      kidx     <= '0;
      ks       <= '0;
      ks_valid <= 1'b0;
    end else if (start) begin
      state    <= RC4_INIT;
      i        <= '0;
      j        <= '0;
      kidx     <= '0;
      ks_valid <= 1'b0;
    end else begin
      unique case (state)
        RC4_IDLE: ;
        RC4_INIT: begin
          i <= i + 1'b1;
          if (i == AW'(M - 1)) state <= RC4_KSA_J;   // i wraps to 0
        end
        RC4_KSA_J: begin
          j      <= add2[AW-1:0];
          si_reg <= si;
          state  <= RC4_KSA_SWAP;
        end
        RC4_KSA_SWAP: begin
          i    <= i + 1'b1;
          kidx <= (kidx == KW'(KEY_LEN - 1)) ? '0 : kidx + 1'b1;
          if (i == AW'(M - 1)) begin
            i     <= AW'(1);
            j     <= '0;
            state <= RC4_PRG_J;
          end else begin
            state <= RC4_KSA_J;
          end
        end
        RC4_PRG_J: begin
          j      <= add2[AW-1:0];
          si_reg <= si;
          state  <= RC4_PRG_SWAP;
        end
        RC4_PRG_SWAP: begin
          t      <= add_t[AW-1:0];
          state  <= RC4_PRG_OUT;
        end
        RC4_PRG_OUT: begin
          ks       <= st;
          ks_valid <= 1'b1;
          i        <= i + 1'b1;
          state    <= RC4_PRG_HOLD;
        end
        RC4_PRG_HOLD: begin
          if (ks_take) begin
            ks_valid <= 1'b0;
            state    <= RC4_PRG_J;
          end
        end
        default: state <= RC4_IDLE;
      endcase
    end
  end

  assign sched_busy = (state == RC4_INIT) || (state == RC4_KSA_J) || (state == RC4_KSA_SWAP);

  // ks_take is only meaningful while a byte is offered.
  a_take_valid: assert property (@(posedge clk) disable iff (!rst_n) ks_take |-> ks_valid);

endmodule
