// xt_tb_pkg: stimulus helpers shared by the system-level testbenches.
//
// gen_instr() makes a 32-bit word that looks like a RISC instruction: a 6-bit
// opcode from a small set, two 5-bit register fields and a 16-bit immediate
// that is usually small (positive or negative) and sometimes a random value.
// Neighbouring instructions then share most of their bit patterns, so
// opposite switching on adjacent wires is occasional rather than constant,
// as in real instruction streams. gen_hostile() returns segments built from
// 0101/1010 patterns, which conflict with each other on every wire pair.
package xt_tb_pkg;

  function automatic logic [31:0] gen_instr();
    logic [5:0]  op;
    logic [4:0]  rs, rt;
    logic [15:0] imm;
    case ($urandom() % 8)
      0: op = 6'h00; 1: op = 6'h08; 2: op = 6'h09; 3: op = 6'h23;
      4: op = 6'h2B; 5: op = 6'h04; 6: op = 6'h05; default: op = 6'h0F;
    endcase
    rs = 5'($urandom() % 12);
    rt = 5'($urandom() % 12);
    case ($urandom() % 4)
      0: imm = 16'($urandom() % 64);
      1: imm = -16'($urandom() % 64);
      2: imm = 16'($urandom());
      default: imm = 16'(($urandom() % 16) << 2);
    endcase
    return {op, rs, rt, imm};
  endfunction

  function automatic logic [31:0] gen_hostile(int unsigned k);
    return (k % 2 == 1) ? 32'h5555_5555 : 32'hAAAA_AAAA;
  endfunction

endpackage
