// hbtc_tb_prog_pkg: the synthetic test program used by the testbenches.
//
// Memory content is a pure function of the address, so no program image is
// stored. Instruction encoding (testbench ISA, [31:28] is the opcode):
//   4'h1 loop branch : taken except on every T-th execution  (T in [27:16])
//   4'h2 exit branch : taken only on every T-th execution
//   4'h3 jump        : always taken
//   4'h8 ALU         : {4'h8, address[29:2]}, so every word names its address
// [15:0] of a branch is the signed word offset from the branch to its target.
//
// Program (byte addresses):
//   0x0000..       straight-line entry
//   0x0010-0x004C  inner loop, 12 iterations; 0x0020 is an exit branch
//                  (T=4) that skips 0x0024-0x002C every 4th time
//   0x0050         exit branch T=5 to 0x8000 (maps onto the same cache lines
//                  as 0x0000 in a 32 KB cache, forcing conflict misses)
//   0x0054         exit branch T=7 to 0x1000
//   0x0058         loop branch T=4 to 0x8040: three passes in four, predicted
//                  taken, go through 0x8040-0x805C, which shares a cache line
//                  index with 0x0040-0x005C, then jump back to 0x0000
//   0x005C         jump back to 0x0000
//   0x8000-0x801C  loop of 8 instructions, 6 iterations, then jump to 0x0000
//   0x1000..0x3800 six jumps 2 KB apart (one BTB set of a 512-set BTB), the
//                  last back to 0x0000, to force BTB replacements
package hbtc_tb_prog_pkg;

  localparam logic [3:0] OP_LOOP = 4'h1;
  localparam logic [3:0] OP_EXIT = 4'h2;
  localparam logic [3:0] OP_JUMP = 4'h3;
  localparam logic [3:0] OP_ALU  = 4'h8;

  function automatic logic [31:0] enc(logic [3:0] op, int unsigned trip,
                                      logic [31:0] pc, logic [31:0] target);
    logic [31:0] off;
    off = (target - pc) >> 2;
    return {op, trip[11:0], off[15:0]};
  endfunction

  function automatic logic [31:0] prog_word(logic [31:0] a);
    case (a)
      32'h0020: return enc(OP_EXIT, 4,  a, 32'h0030);
      32'h004C: return enc(OP_LOOP, 12, a, 32'h0010);
      32'h0050: return enc(OP_EXIT, 5,  a, 32'h8000);
      32'h0054: return enc(OP_EXIT, 7,  a, 32'h1000);
      32'h0058: return enc(OP_LOOP, 4,  a, 32'h8040);
      32'h005C: return enc(OP_JUMP, 0,  a, 32'h0000);
      32'h805C: return enc(OP_JUMP, 0,  a, 32'h0000);
      32'h801C: return enc(OP_LOOP, 6,  a, 32'h8000);
      32'h8020: return enc(OP_JUMP, 0,  a, 32'h0000);
      32'h1000: return enc(OP_JUMP, 0,  a, 32'h1800);
      32'h1800: return enc(OP_JUMP, 0,  a, 32'h2000);
      32'h2000: return enc(OP_JUMP, 0,  a, 32'h2800);
      32'h2800: return enc(OP_JUMP, 0,  a, 32'h3000);
      32'h3000: return enc(OP_JUMP, 0,  a, 32'h3800);
      32'h3800: return enc(OP_JUMP, 0,  a, 32'h0000);
      default:  return {OP_ALU, a[29:2]};
    endcase
  endfunction

  // Random program k (PROG=k > 0): a 48 KB code region, 0x0000-0xBFFC, whose words
  // are drawn from a hash of the address. About one word in six is a branch:
  // short backward loops (T = 2..9), forward exit branches (T = 2..5) and jumps
  // to anywhere in the region. Everything above the region jumps back to 0.
  function automatic logic [31:0] hash32(logic [31:0] a);
    logic [31:0] h;
    h = a * 32'h9E37_79B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EB_CA6B;
    return h ^ (h >> 13);
  endfunction

  function automatic logic [31:0] rand_prog_word(int k, logic [31:0] a);
    logic [31:0] h, tgt;
    if (a >= 32'h0000_C000) return enc(OP_JUMP, 0, a, 32'h0000);
    h = hash32(a ^ (32'(k) * 32'h2545_F491));
    case (h[2:0])
      3'd0: begin
        tgt = a - 32'(4 * (1 + h[10:5]));
        if (tgt > a) tgt = 32'h0;
        return enc(OP_LOOP, 2 + int'(h[14:12]), a, tgt);
      end
      3'd1: if (h[3]) return enc(OP_EXIT, 2 + int'(h[13:12]), a, a + 32'(4 * (2 + h[9:5])));
      3'd2: if (h[4:3] == 2'b00) return enc(OP_JUMP, 0, a, {16'h0, h[31:18] % 14'd12288, 2'b00});
      default: ;
    endcase
    return {OP_ALU, a[29:2]};
  endfunction

  // Replacement program (PROG=-1): a loop whose body overflows one BTB set.
  //   0x0000         jump to 0x4000
  //   0x4000 (T)     loop top
  //   0x4010 (B)     loop branch T=3 to 0x4040: every third pass it falls
  //                  through into 0x4014-0x403C (F)
  //   0x4040         jump to a chain of six jumps 0x1010, 0x1810, ... 0x3810,
  //                  which share BTB set 4 with B and so evict B every pass
  //   0xC020 (Z)     reached from the chain; shares a cache line index with
  //                  0x4020, the second line of F, and jumps to 0x4060
  //   0x4060-0x4068  short inner loop, 6 iterations, where footprints do work
  //   0x406C (A)     loop branch back to T (practically endless)
  // A footprint left on A must be erased by the BTB replacements of the pass;
  // otherwise the next fall-through into F reads Z's line without a compare.
  function automatic logic [31:0] repl_prog_word(logic [31:0] a);
    case (a)
      32'h0000: return enc(OP_JUMP, 0,    a, 32'h4000);
      32'h4010: return enc(OP_LOOP, 3,    a, 32'h4040);
      32'h4040: return enc(OP_JUMP, 0,    a, 32'h1010);
      32'h1010: return enc(OP_JUMP, 0,    a, 32'h1810);
      32'h1810: return enc(OP_JUMP, 0,    a, 32'h2010);
      32'h2010: return enc(OP_JUMP, 0,    a, 32'h2810);
      32'h2810: return enc(OP_JUMP, 0,    a, 32'h3010);
      32'h3010: return enc(OP_JUMP, 0,    a, 32'h3810);
      32'h3810: return enc(OP_JUMP, 0,    a, 32'hC020);
      32'hC02C: return enc(OP_JUMP, 0,    a, 32'h4060);
      32'h4068: return enc(OP_LOOP, 6,    a, 32'h4060);
      32'h406C: return enc(OP_LOOP, 4000, a, 32'h4000);
      default:  return {OP_ALU, a[29:2]};
    endcase
  endfunction

  // Epoch program (PROG=-2), for a core that resolves branches late:
  //   0x0000         jump to 0x3FF0
  //   0x3FE0         target of W; falls through to S
  //   0x3FF0 (S)     target of X
  //   0x3FFC (Y)     loop branch T=3 to W=0xBFE0, a line that shares the
  //                  cache index of line 0x3FE0
  //   0xBFE0 (W)     three instructions, then jump to 0x3FE0
  //   0x4000-0x401C  fall-through of Y
  //   0x4020 (X)     jump back to S
  // Each taken pass of Y refills W and then 0x3FE0, which evicts W again.
  // A late resolution of Y that set its taken footprint after those fills
  // would make the next pass read W without a tag comparison.
  function automatic logic [31:0] epoch_prog_word(logic [31:0] a);
    case (a)
      32'h0000: return enc(OP_JUMP, 0,    a, 32'h3FF0);
      32'h3FFC: return enc(OP_LOOP, 3,    a, 32'hBFE0);
      32'hBFEC: return enc(OP_JUMP, 0,    a, 32'h3FE0);
      32'h4020: return enc(OP_JUMP, 0,    a, 32'h3FF0);
      default:  return {OP_ALU, a[29:2]};
    endcase
  endfunction

  // Pending-refill program (PROG=-3), for a core that resolves a branch a
  // few cycles after delivery, while a refill it caused is still pending:
  //   0x1000 (S)     jump to R=0xBFF0, which brings line 0xBFE0 in
  //   0xBFFC         jump to A=0x2000
  //   0x200C (Y)     jump to W=0xBFE0 (resident at this point)
  //   0xBFEC         jump to C=0x3FE0, a line that shares W's cache index
  //   0x3FEC         loop branch T=2 back to A, else fall through to
  //   0x3FFC         jump to S
  // Y resolves while C is being refilled, before the epoch moves on, so it
  // sets its taken footprint; the refill then evicts W. Only the erase that
  // comes with the fill keeps the second fetch of Y from skipping W's tags.
  function automatic logic [31:0] refill_prog_word(logic [31:0] a);
    case (a)
      32'h0000: return enc(OP_JUMP, 0, a, 32'h1000);
      32'h1000: return enc(OP_JUMP, 0, a, 32'hBFF0);
      32'hBFFC: return enc(OP_JUMP, 0, a, 32'h2000);
      32'h200C: return enc(OP_JUMP, 0, a, 32'hBFE0);
      32'hBFEC: return enc(OP_JUMP, 0, a, 32'h3FE0);
      32'h3FEC: return enc(OP_LOOP, 2, a, 32'h2000);
      32'h3FFC: return enc(OP_JUMP, 0, a, 32'h1000);
      default:  return {OP_ALU, a[29:2]};
    endcase
  endfunction

  function automatic logic [31:0] word(int prog, logic [31:0] a);
    if (prog == -3) return refill_prog_word(a);
    if (prog == -2) return epoch_prog_word(a);
    if (prog < 0) return repl_prog_word(a);
    return (prog > 0) ? rand_prog_word(prog, a) : prog_word(a);
  endfunction

  function automatic logic [31:0] branch_target(logic [31:0] pc, logic [31:0] w);
    logic [31:0] off;
    off = {{14{w[15]}}, w[15:0], 2'b00};
    return pc + off;
  endfunction

endpackage
