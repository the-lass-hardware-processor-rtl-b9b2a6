// am2901: one 4-bit bipolar micro-processor slice of the 2901A type.
//
// It holds 16 four-bit registers with two read addresses (A and B), the
// auxiliary Q register, two operand multiplexers (R from A, D or 0; S from A,
// B, Q or 0), an 8-function ALU, a shifter in front of the register file,
// a shifter in front of Q, and an output multiplexer choosing A or F for Y.
// These parts and the 18-bit instruction come from the 2901A block diagram;
// the source, function and destination codes are the standard 2901 codes.
//
// Interface: the instruction (lass_pkg::slice_instr_t) and D are combinational
// inputs; Y, the shift pins and the flags settle in the same cycle. Registers
// and Q are written at the rising clock edge when we is high (the
// processor clock of the slice). The bidirectional shift pins of the real
// part are split into *_in and *_out: ram0_out/ram3_out carry F[0]/F[3],
// q0_out/q3_out carry Q[0]/Q[3].
//
// Own choices: G and P are active high and describe R+S, S-R or R-S
// without the carry-in; for the logic functions G, P, carry-out and
// overflow are 0. The A/B latches of the part are modelled by reading the
// register file before the clock edge writes it.
module am2901
  import lass_pkg::*;
#(
  parameter int unsigned NREGS = 16
) (
  input  logic         clk,
  input  logic         we,
  input  slice_instr_t instr,
  input  logic [3:0]   d,
  input  logic         cin,
  input  logic         ram0_in,   // LSB shifted in on an up shift
  input  logic         ram3_in,   // MSB shifted in on a down shift
  input  logic         q0_in,     // Q LSB shifted in on an up shift
  input  logic         q3_in,     // Q MSB shifted in on a down shift
  output logic [3:0]   y,
  output logic         ram0_out,
  output logic         ram3_out,
  output logic         q0_out,
  output logic         q3_out,
  output logic         cout,
  output logic         ovr,
  output logic         f_zero,
  output logic         f3,
  output logic         g,
  output logic         p
);

  logic [3:0] regs [NREGS];
  logic [3:0] q;
  logic [3:0] a_lat, b_lat, r, s, f, r_op, s_op;
  logic [4:0] sum;
  logic [3:0] sum3;
  logic       arith;

  assign a_lat = regs[instr.a];
  assign b_lat = regs[instr.b];

  // Source operand multiplexers
  always_comb begin
    unique case (instr.src)
      SRC_AQ:  begin r = a_lat; s = q;     end
      SRC_AB:  begin r = a_lat; s = b_lat; end
      SRC_ZQ:  begin r = '0;    s = q;     end
      SRC_ZB:  begin r = '0;    s = b_lat; end
      SRC_ZA:  begin r = '0;    s = a_lat; end
      SRC_DA:  begin r = d;     s = a_lat; end
      SRC_DQ:  begin r = d;     s = q;     end
      default: begin r = d;     s = '0;    end  // SRC_DZ
    endcase
  end

  // ALU
  always_comb begin
    r_op  = r;
    s_op  = s;
    arith = 1'b1;
    unique case (instr.func)
      FN_SUBR: r_op = ~r;
      FN_SUBS: s_op = ~s;
      FN_ADD:  ;
      default: arith = 1'b0;
    endcase
    sum  = {1'b0, r_op} + {1'b0, s_op} + {4'b0, cin};
    sum3 = {1'b0, r_op[2:0]} + {1'b0, s_op[2:0]} + {3'b0, cin};
    unique case (instr.func)
      FN_OR:    f = r | s;
      FN_AND:   f = r & s;
      FN_NOTRS: f = ~r & s;
      FN_EXOR:  f = r ^ s;
      FN_EXNOR: f = ~(r ^ s);
      default:  f = sum[3:0];
    endcase
    cout = arith & sum[4];
    ovr  = arith & (sum[4] ^ sum3[3]);
  end

  // Look-ahead outputs: G = g3 | p3 g2 | p3 p2 g1 | p3 p2 p1 g0, P = p3 p2 p1 p0
  logic [3:0] gi, pi;
  assign gi = r_op & s_op;
  assign pi = r_op | s_op;
  assign g  = arith & (gi[3] | (pi[3] & gi[2]) | (pi[3] & pi[2] & gi[1]) |
                       (pi[3] & pi[2] & pi[1] & gi[0]));
  assign p  = arith & (&pi);

  assign f_zero   = (f == 4'h0);
  assign f3       = f[3];
  assign ram0_out = f[0];
  assign ram3_out = f[3];
  assign q0_out   = q[0];
  assign q3_out   = q[3];

  // Output multiplexer
  assign y = (instr.dst == DST_RAMA) ? a_lat : f;

  // Register file and Q register with their shifters
  always_ff @(posedge clk) begin
    if (we) begin
      unique case (instr.dst)
        DST_RAMA, DST_RAMF:   regs[instr.b] <= f;
        DST_RAMQD, DST_RAMD:  regs[instr.b] <= {ram3_in, f[3:1]};
        DST_RAMQU, DST_RAMU:  regs[instr.b] <= {f[2:0], ram0_in};
        default: ;
      endcase
      unique case (instr.dst)
        DST_QREG:  q <= f;
        DST_RAMQD: q <= {q3_in, q[3:1]};
        DST_RAMQU: q <= {q[2:0], q0_in};
        default: ;
      endcase
    end
  end

endmodule
