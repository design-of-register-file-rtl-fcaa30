// rf_control: turns the register file's single control line into the read
// and write strobes, using two Feynman gates with a constant 1 on their second
// inputs.
//
// Gate 1 gives read1 = ctrl on its first output and write = ~ctrl on its
// second; gate 2 gives read2 = ctrl on its first output, its second output is
// garbage. So a high control line enables both read ports and a low one
// enables the write port. Purely combinational.
module rf_control (
  input  logic ctrl,
  output logic read1,
  output logic read2,
  output logic write
);
  logic unused_q2;

  feynman_gate u_fey1 (
    .a (ctrl),
    .b (1'b1),
    .p (read1),
    .q (write)
  );

  feynman_gate u_fey2 (
    .a (ctrl),
    .b (1'b1),
    .p (read2),
    .q (unused_q2)
  );
endmodule
