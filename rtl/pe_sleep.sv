// pe_sleep: PE activity control ("sleep" unit, MASK instructions).
//
// Holds one flag, active. A sleeping PE still takes part in communication and
// still executes MASK instructions and SAMPLE, but writes no register, memory,
// accumulator or output register. MASK instructions narrow the set of active
// PEs by a test on a register value (> 0, < 0, == 0), invert it (to run the
// "else" side of a test), or wake every PE. The test set and the
// narrowing rule are this design's choice; the original names the unit and
// the MASK instruction class only. Reset makes the PE active.
//
// Timing: the new flag takes effect at the rising clock edge, for the next
// instruction.
module pe_sleep
  import simd_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  mask_op_e op,
  input  word_t    val,
  output logic     active
);
  logic next;

  always_comb begin
    unique case (op)
      MASK_WAKE: next = 1'b1;
      MASK_GTZ:  next = active & ($signed(val) > 0);
      MASK_LTZ:  next = active & ($signed(val) < 0);
      MASK_EQZ:  next = active & (val == '0);
      MASK_INV:  next = ~active;
      default:   next = active;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) active <= 1'b1;
    else        active <= next;
  end
endmodule
