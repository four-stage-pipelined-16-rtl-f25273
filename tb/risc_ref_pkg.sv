// risc_ref_pkg: instruction-level reference model of the four-stage RISC,
// used by the testbenches to work out expected results independently of
// the RTL.
//
// ref_exec applies one instruction to an architectural state. The pipeline
// has no forwarding: when instruction k executes, the register file holds
// the results of instructions up to k-2 but not yet that of k-1. The model
// therefore keeps two register states, the one operands are read from
// (rd) and the newest one (cur), and ref_exec reads from rd and writes into
// cur. Memory accesses happen in program order.
package risc_ref_pkg;

  typedef logic [15:0] w16_t;

  typedef struct {
    w16_t rd  [16];   // state seen by the instruction now executing
    w16_t cur [16];   // state including the instruction just ahead
    w16_t dmem [32];
  } ref_state_t;

  function automatic w16_t ref_alu(logic [3:0] op, w16_t a, w16_t b);
    int unsigned ua = 32'(a), ub = 32'(b);
    case (op)
      4'd1:  return w16_t'((ua + ub) % 65536);
      4'd2:  return w16_t'((ua + 65536 - ub) % 65536);
      4'd3:  return a & b;
      4'd4:  return a | b;
      4'd5:  return a ^ b;
      4'd6:  return w16_t'((ua + 1) % 65536);
      4'd7:  return w16_t'((ua + 65535) % 65536);
      4'd8:  return w16_t'(65535 - ua);
      4'd9:  return w16_t'((65536 - ua) % 65536);
      4'd10: return w16_t'(ua / 2);
      4'd11: return w16_t'((ua * 2) % 65536);
      4'd12: return w16_t'(ua / 2 + (ua % 2) * 32768);
      4'd13: return w16_t'((ua * 2) % 65536 + ua / 32768);
      default: return '0;
    endcase
  endfunction

  function automatic void ref_reset(ref_state_t s, output ref_state_t o);
    o = s;
    foreach (o.rd[i]) begin o.rd[i] = '0; o.cur[i] = '0; end
  endfunction

  function automatic void ref_exec(input ref_state_t s, input w16_t instr,
                                   output ref_state_t o);
    logic [3:0] op = instr[15:12];
    w16_t next [16];
    o = s;
    next = s.cur;
    case (op)
      4'd0: ;
      4'd14: next[instr[3:0]] = s.dmem[instr[9:5]];
      4'd15: o.dmem[instr[4:0]] = s.rd[instr[8:5]];
      default: next[instr[3:0]] = ref_alu(op, s.rd[instr[11:8]], s.rd[instr[7:4]]);
    endcase
    o.rd  = s.cur;
    o.cur = next;
  endfunction

endpackage
