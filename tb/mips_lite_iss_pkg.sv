// mips_lite_iss_pkg: test-bench helpers for the MIPS-lite CPU.
//
// Instruction encoders (an assembler for the six instructions) and an
// instruction-set reference model written from the register-transfer
// definitions alone, independent of the RTL:
//   addu  R[rd] <- R[rs] + R[rt]
//   subu  R[rd] <- R[rs] - R[rt]
//   ori   R[rt] <- R[rs] | zero_ext(imm16)
//   lw    R[rt] <- MEM[R[rs] + sign_ext(imm16)]
//   sw    MEM[R[rs] + sign_ext(imm16)] <- R[rt]
//   beq   if (R[rs] == R[rt]) PC <- PC + 4 + (sign_ext(imm16) || 00)
// every other instruction: PC <- PC + 4. Register 0 always reads 0. The data
// memory has DWORDS words addressed by byte address bits [.. : 2].
package mips_lite_iss_pkg;

  function automatic logic [31:0] enc_r(input logic [5:0] funct, input int rd, input int rs, input int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, funct};
  endfunction
  function automatic logic [31:0] enc_i(input logic [5:0] op, input int rt, input int rs, input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] addu(input int rd, input int rs, input int rt); return enc_r(6'h21, rd, rs, rt); endfunction
  function automatic logic [31:0] subu(input int rd, input int rs, input int rt); return enc_r(6'h23, rd, rs, rt); endfunction
  function automatic logic [31:0] ori (input int rt, input int rs, input int imm); return enc_i(6'h0D, rt, rs, imm); endfunction
  function automatic logic [31:0] lw  (input int rt, input int imm, input int rs); return enc_i(6'h23, rt, rs, imm); endfunction
  function automatic logic [31:0] sw  (input int rt, input int imm, input int rs); return enc_i(6'h2B, rt, rs, imm); endfunction
  function automatic logic [31:0] beq (input int rs, input int rt, input int off); return enc_i(6'h04, rt, rs, off); endfunction

  // Kinds of events the reference model counts
  typedef enum int {
    EV_ADDU, EV_SUBU, EV_ORI, EV_LW, EV_SW, EV_BEQ_TAKEN, EV_BEQ_NOT_TAKEN,
    EV_NEG_OFFSET, EV_ORI_HIGH_IMM, EV_WRITE_R0, EV_NOP, EV_COUNT
  } event_e;

  localparam string EV_NAMES [EV_COUNT] = '{
    "addu", "subu", "ori", "lw", "sw", "beq taken", "beq not taken",
    "negative offset", "ori imm bit15", "write to $0", "no-op"};

  class iss #(int DWORDS = 256);
    logic [31:0] r   [32];
    logic [31:0] mem [DWORDS];
    logic [31:0] pc;
    int          events [EV_COUNT];
    // what the last step wrote
    bit          wrote_reg;
    int          wreg;
    bit          wrote_mem;
    int          widx;

    function new();
      foreach (r[i]) r[i] = '0;
      foreach (mem[i]) mem[i] = '0;
      foreach (events[i]) events[i] = 0;
      pc = '0;
    endfunction

    function automatic int idx(input logic [31:0] a);
      return int'((a >> 2) % DWORDS);
    endfunction

    function automatic void step(input logic [31:0] ins);
      logic [5:0]  op    = ins[31:26];
      int          rs    = int'(ins[25:21]);
      int          rt    = int'(ins[20:16]);
      int          rd    = int'(ins[15:11]);
      logic [5:0]  funct = ins[5:0];
      logic [31:0] simm  = {{16{ins[15]}}, ins[15:0]};
      logic [31:0] zimm  = {16'h0, ins[15:0]};
      logic [31:0] a     = r[rs];
      logic [31:0] b     = r[rt];
      logic [31:0] nxt   = pc + 4;
      wrote_reg = 0; wrote_mem = 0;
      if (op == 6'h00 && (funct == 6'h21 || funct == 6'h23)) begin
        wreg = rd; wrote_reg = 1;
        if (rd != 0) r[rd] = (funct == 6'h21) ? a + b : a - b;
        events[(funct == 6'h21) ? EV_ADDU : EV_SUBU]++;
        if (rd == 0) events[EV_WRITE_R0]++;
      end else if (op == 6'h0D) begin
        wreg = rt; wrote_reg = 1;
        if (rt != 0) r[rt] = a | zimm;
        events[EV_ORI]++;
        if (ins[15]) events[EV_ORI_HIGH_IMM]++;
        if (rt == 0) events[EV_WRITE_R0]++;
      end else if (op == 6'h23) begin
        wreg = rt; wrote_reg = 1;
        if (rt != 0) r[rt] = mem[idx(a + simm)];
        events[EV_LW]++;
        if (ins[15]) events[EV_NEG_OFFSET]++;
        if (rt == 0) events[EV_WRITE_R0]++;
      end else if (op == 6'h2B) begin
        widx = idx(a + simm); wrote_mem = 1;
        mem[widx] = b;
        events[EV_SW]++;
        if (ins[15]) events[EV_NEG_OFFSET]++;
      end else if (op == 6'h04) begin
        if (a == b) begin
          nxt = pc + 4 + {simm[29:0], 2'b00};
          events[EV_BEQ_TAKEN]++;
        end else begin
          events[EV_BEQ_NOT_TAKEN]++;
        end
      end else begin
        events[EV_NOP]++;
      end
      pc = nxt;
    endfunction
  endclass

endpackage
