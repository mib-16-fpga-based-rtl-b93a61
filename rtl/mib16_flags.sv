// mib16_flags: the 3-bit condition code register CC (V, N, Z).
//
// Loads the ALU's condition codes on the rising clock edge when load is high;
// the control unit raises load once per arithmetic or logic instruction, so
// the flags describe the last such result. Loads and stores leave the flags
// alone. Reset clears all three flags (reset value chosen here).
module mib16_flags
  import mib16_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic load,
  input  cc_t  cc_in,
  output cc_t  cc
);

  always_ff @(posedge clk) begin
    if (reset)     cc <= '0;
    else if (load) cc <= cc_in;
  end

endmodule
