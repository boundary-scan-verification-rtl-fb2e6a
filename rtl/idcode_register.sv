// idcode_register: the 32-bit device identification register.
//
// When selected, it loads the IDCODE value on the rising TCK edge in
// Capture-DR and shifts right in Shift-DR, TDI entering at bit 31 and bit 0
// leaving first on so. Bit 0 of an IDCODE is always 1; bits 31:28 are the
// version, 27:12 the part number and 11:1 the JEDEC manufacturer identity.
// The default value 32'h84108013 is the device's.
module idcode_register
  import jtag_pkg::*;
#(
  parameter logic [31:0] IDCODE = DEFAULT_IDCODE
) (
  input  logic       tck,
  input  logic       trst_n,
  input  tap_state_e state,
  input  logic       sel,
  input  logic       tdi,
  output logic       so
);

  logic [31:0] sr;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) sr <= IDCODE;
    else if (sel && state == CAPTURE_DR) sr <= IDCODE;
    else if (sel && state == SHIFT_DR)   sr <= {tdi, sr[31:1]};
  end

  assign so = sr[0];

  initial assert (IDCODE[0] == 1'b1) else $error("IDCODE bit 0 must be 1");

endmodule
