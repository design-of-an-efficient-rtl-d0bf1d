// aes_control_unit: microprogrammed control of the data and key units.
//
// The control word (aes_pkg::ctrl_t, one field per control signal of the datapath) is read
// from a micro-program ROM every cycle. The ROM holds five micro-routines of up to nine
// words: START (load state column 0), R1 (first round), RN (rounds 2..9), RL (round 10,
// MixColumns bypassed, result to the I/O interface) and KS (one key-setup step). A small
// sequencer steps the micro-program counter u through a routine and picks the next routine
// from a round counter. Routine word u of a round, with u = 0 the cycle X holds column 0:
//   u 0..3  S0..S3 load columns 0..3; X loads columns 1..3 of the previous round
//   u 3     key unit applies the round key step (so X loads after u 3 use the new key)
//   u 1..7  R0..R5 capture / release bytes, rows 0..3 feed the array at u 1+k..4+k
//   u 6,7   key unit sends RotWord through S0..S3 and captures SubWord for the next step
//   u 8     X loads column 0 of this round (RL: X loads at u 4..7 from the bypass and
//           hands the result to the I/O interface at u 5..8)
// A block takes 1 (PRE: key unit start, array coefficients) + 1 (START) + 10 * 9 cycles.
// After a cipher key is loaded, key setup runs ten KS steps of 3 cycles (S-box load,
// capture, update), bracketed by one cycle each, and stores round key 10.
// The microprogrammed ROM follows the published design; the routines and the schedule are this
// design's own. ready is high when a new key or block can be accepted.
module aes_control_unit
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  key_done,     // fourth cipher key word written
  input  logic  blk_go,       // fourth block word written
  input  logic  blk_dec,      // that block is to be decrypted
  output ctrl_t ctrl,
  output logic  dec,          // direction of the running block
  output logic  coef_ld,
  output logic  key_start,
  output logic  setup_begin,
  output logic  setup_end,
  output logic  bwd,
  output logic  ready
);

  typedef enum logic [2:0] {T_START, T_R1, T_RN, T_RL, T_KS} rtype_e;
  typedef enum logic [2:0] {S_IDLE, S_KSI, S_KS, S_KSE, S_PRE, S_RUN} state_e;

  localparam int unsigned NTYPES = 5;
  typedef ctrl_t [NTYPES*ROUND_LEN-1:0] rom_t;   // packed: usable as a constant

  function automatic ctrl_t ucode(int unsigned t, int unsigned u);
    ctrl_t c;
    c = '0;
    if (t == int'(T_START)) begin
      if (u == 0) begin
        c.x_ld   = 1'b1;  c.x_src = XSRC_IO;  c.x_idx = 2'd0;
        c.sb_key = 1'b1;
      end
    end else if (t == int'(T_KS)) begin
      c.sb_key  = (u == 0);
      c.key_sw  = (u == 1);
      c.key_upd = (u == 2);
    end else begin
      if (u <= 3) c.sb_ld = 1'b1;
      if (u <= 2) begin
        c.x_ld  = 1'b1;
        c.x_src = (t == int'(T_R1)) ? XSRC_IO : XSRC_ARR;
        c.x_idx = 2'(u + 1);
      end
      if (t == int'(T_R1) && u == 0) c.key_sw = 1'b1;
      if (u == 3) c.key_upd = 1'b1;
      for (int unsigned k = 1; k <= 3; k++) begin
        c.r_shift[k] = (u >= 1 && u <= k) || (u >= 5 && u <= 4 + k);
        c.r_held[k]  = (u >= 5 && u <= 4 + k);
      end
      for (int unsigned k = 0; k <= 3; k++)
        c.feed[k] = (u >= 1 + k && u <= 4 + k);
      if (t == int'(T_RL)) begin
        c.byp = 1'b1;
        if (u >= 4 && u <= 7) begin
          c.x_ld = 1'b1;  c.x_src = XSRC_BYP;  c.x_idx = 2'(u - 4);
        end
        c.out_v = (u >= 5 && u <= 8);
      end else begin
        if (u == 6) c.sb_key = 1'b1;
        if (u == 7) c.key_sw = 1'b1;
        if (u == 8) begin
          c.x_ld = 1'b1;  c.x_src = XSRC_ARR;  c.x_idx = 2'd0;
        end
      end
    end
    return c;
  endfunction

  function automatic rom_t gen_rom();
    rom_t r;
    for (int unsigned t = 0; t < NTYPES; t++)
      for (int unsigned u = 0; u < ROUND_LEN; u++)
        r[t*ROUND_LEN + u] = ucode(t, u);
    return r;
  endfunction

  localparam rom_t ROM = gen_rom();

  state_e     state;
  rtype_e     rtype;
  logic [3:0] u;
  logic [3:0] rnd;   // round number in RUN, step number in KS

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      rtype <= T_START;
      u     <= '0;
      rnd   <= '0;
      dec   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (key_done) state <= S_KSI;
          else if (blk_go) begin
            state <= S_PRE;
            dec   <= blk_dec;
          end
        end
        S_KSI: begin
          state <= S_KS;  rtype <= T_KS;  u <= '0;  rnd <= 4'd1;
        end
        S_KS: begin
          if (u == 4'd2) begin
            u <= '0;
            if (rnd == 4'(ROUNDS)) state <= S_KSE;
            else rnd <= rnd + 4'd1;
          end else u <= u + 4'd1;
        end
        S_KSE: state <= S_IDLE;
        S_PRE: begin
          state <= S_RUN;  rtype <= T_START;  u <= '0;  rnd <= '0;
        end
        S_RUN: begin
          if (rtype == T_START) begin
            rtype <= T_R1;  u <= '0;  rnd <= 4'd1;
          end else if (u == 4'(ROUND_LEN - 1)) begin
            u <= '0;
            if (rtype == T_RL) state <= S_IDLE;
            else begin
              rnd   <= rnd + 4'd1;
              rtype <= (rnd == 4'(ROUNDS - 1)) ? T_RL : T_RN;
            end
          end else u <= u + 4'd1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ctrl        = (state == S_RUN || state == S_KS) ? ROM[int'(rtype)*ROUND_LEN + int'(u)] : '0;
  assign coef_ld     = (state == S_PRE);
  assign key_start   = (state == S_PRE);
  assign setup_begin = (state == S_KSI);
  assign setup_end   = (state == S_KSE);
  assign bwd         = dec && (state == S_RUN);
  assign ready       = (state == S_IDLE);

endmodule
