// Special-value handling: NaN and infinity results and the invalid flag.
//
// Decides from the decoded operands whether the result is not a finite
// number and, if so, what it is:
//  - any NaN operand: the first NaN of A, B, C is returned quiet, payload
//    kept (binary: bit 51 set; decimal: G7..G0 cleared);
//  - 0 x infinity: default quiet NaN, invalid (raised even when C is a
//    quiet NaN, as the design notes choose);
//  - infinite product plus an infinity of the opposite effective sign:
//    default NaN, invalid;
//  - otherwise an infinite product or addend gives a correctly signed
//    infinity.
// A signaling NaN operand raises invalid. Purely combinational. The
// choice of which NaN to return and the default NaN encodings are this
// design's.
module special_values
  import bdfma_pkg::*;
(
  input  logic        bd,
  input  logic        op,                 // 1: A*B - C
  input  operand_t    a, b, c,
  input  logic [63:0] opa, opb, opc,      // raw operands (NaN payloads)
  output logic        is_special,
  output logic [63:0] res,
  output logic        invalid
);
  logic sm, sc, zinf, pinf;
  logic [63:0] dnan, inf_p;
  function automatic logic [63:0] quiet(input logic [63:0] x, input logic binary);
    if (binary) return x | 64'h0008_0000_0000_0000;
    else        return {x[63:58], 8'd0, x[49:0]};
  endfunction
  always_comb begin
    sm    = a.sign ^ b.sign;
    sc    = c.sign ^ op;
    zinf  = (a.is_zero & b.is_inf) | (a.is_inf & b.is_zero);
    pinf  = a.is_inf | b.is_inf;
    dnan  = bd ? 64'h7ff8_0000_0000_0000 : 64'h7c00_0000_0000_0000;
    inf_p = bd ? 64'h7ff0_0000_0000_0000 : 64'h7800_0000_0000_0000;
    is_special = 1'b1;
    invalid    = a.is_snan | b.is_snan | c.is_snan | zinf;
    res        = dnan;
    if (a.is_nan)      res = quiet(opa, bd);
    else if (b.is_nan) res = quiet(opb, bd);
    else if (c.is_nan) res = quiet(opc, bd);
    else if (zinf)     res = dnan;
    else if (pinf && c.is_inf && (sm != sc)) begin
      res = dnan;
      invalid = 1'b1;
    end
    else if (pinf)     res = inf_p | {sm, 63'd0};
    else if (c.is_inf) res = inf_p | {sc, 63'd0};
    else               is_special = 1'b0;
  end
  logic unused_fields;
  assign unused_fields = ^{a, b, c};
endmodule
