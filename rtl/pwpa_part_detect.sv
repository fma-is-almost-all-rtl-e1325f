// PWPA partition detector. The input x (the shifted operand x') is compared
// against the 7 ordered inner breakpoints broadcast from ParamMem, all in
// parallel, and the 3-bit partition id is resolved by a binary tree of
// multiplexers over the comparator outputs: the middle breakpoint decides
// the MSB, which selects the quarter breakpoint that decides the next bit,
// and so on. Partition p covers [bp[p-1], bp[p]), partition 0 everything
// below bp[0] and partition 7 everything from bp[6] up. Combinational; the
// row registers the id. Breakpoints must be sorted ascending.
module pwpa_part_detect
  import nl_pkg::*;
(
  input  fp16_t                x_i,
  input  fp16_t [PW_NBP-1:0]   bp_i,
  output logic  [PW_IDW-1:0]   id_o
);

  logic [PW_NBP-1:0] ge;   // x >= bp[i]

  always_comb begin
    for (int i = 0; i < PW_NBP; i++) ge[i] = !fp16_lt(x_i, bp_i[i]);
    id_o[2] = ge[3];
    id_o[1] = id_o[2] ? ge[5] : ge[1];
    case ({id_o[2], id_o[1]})
      2'b00:   id_o[0] = ge[0];
      2'b01:   id_o[0] = ge[2];
      2'b10:   id_o[0] = ge[4];
      default: id_o[0] = ge[6];
    endcase
  end

endmodule
