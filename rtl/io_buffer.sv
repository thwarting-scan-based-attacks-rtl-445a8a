// io_buffer -- one bidirectional pad shared by the scan input and the test
// result of a chain.
//
// A scan test never needs Sin and TestRes at the same time: Sin is used while
// shifting, TestRes is read during capture. The pad is therefore an input while
// oe = 0 and drives d_out while oe = 1. d_in always follows the pad, so the
// scan chain sees the tester's bit while shifting.
//
// Interface: purely combinational. In the secure comparator, oe is NOT sen,
// so the pad turns to an output as soon as sen falls.
//
// Sharing one pin in this way follows the published scheme; the buffer itself
// is written as a generic tristate, to be mapped to the library's bidirectional
// pad cell.
module io_buffer (
  inout  wire  pad,    // chip pin
  input  logic oe,     // 1 = drive d_out onto the pad
  input  logic d_out,  // value to drive (TestRes)
  output logic d_in    // value on the pad (Sin)
);

  assign pad  = oe ? d_out : 1'bz;
  assign d_in = pad;

endmodule
