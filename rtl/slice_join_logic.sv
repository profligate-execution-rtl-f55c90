// slice_join_logic: register-state rules for an instruction with two sources.
//
// Given the slice state (S, O, INV) of the left and right source registers it
// gives the destination state and whether this core executes the instruction,
// must read the right operand from the global reorder buffer first, and must
// write its result into the global reorder buffer at commit. The nine cases are
// the document's miss slice join table: any INV source poisons the result,
// except left O with right INV, where the owner of the left operand fetches the
// right one and executes the join. Purely combinational.
module slice_join_logic
  import pe_pkg::*;
(
  input  reg_state_e left_i,
  input  reg_state_e right_i,
  output reg_state_e dest_o,
  output logic       execute_o,
  output logic       read_grob_o,
  output logic       write_grob_o
);
  always_comb begin
    dest_o       = RS_INV;
    execute_o    = 1'b0;
    read_grob_o  = 1'b0;
    write_grob_o = 1'b0;
    unique case (left_i)
      RS_O: begin
        // owner of the left operand always executes and publishes its result
        dest_o       = RS_O;
        execute_o    = 1'b1;
        write_grob_o = 1'b1;
        read_grob_o  = (right_i == RS_INV);
      end
      RS_S: begin
        if (right_i != RS_INV) begin
          execute_o    = 1'b1;
          dest_o       = right_i;          // S,S -> S ; S,O -> O
          write_grob_o = (right_i == RS_O);
        end
      end
      default: ;                           // INV left: discard
    endcase
  end
endmodule
