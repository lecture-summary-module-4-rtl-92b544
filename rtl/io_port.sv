// io_port - one input port and one output port at a fixed I/O address.
//
// The port is selected when the address bus equals PORT_ADDR (00000). For an
// IN instruction (ior) the input pins are driven onto the data bus
// (db_out_en). For an OUT instruction (iow) the data bus value goes to the
// output pins. With LATCHED = 1, the configuration the specification builds,
// the output pins come from a transparent latch that is open while iow and
// the port select are asserted, so the value stays on the pins until the next
// OUT. The latch is intended (circuit warnings about it stand for that
// reason). With LATCHED = 0, the alternative it is compared with, the pins
// carry the data only during the OUT execute cycle and are 0 otherwise (that
// idle value is this design's choice).
module io_port
  import sc_pkg::*;
#(
  parameter logic [ADDR_W-1:0] PORT_ADDR = '0,
  parameter bit                LATCHED   = 1'b1
) (
  input  logic [ADDR_W-1:0] addr,
  input  logic              ior,
  input  logic              iow,
  input  logic [DATA_W-1:0] db_in,
  input  logic [DATA_W-1:0] in_pins,
  output logic [DATA_W-1:0] db_out,
  output logic              db_out_en,
  output logic [DATA_W-1:0] out_pins
);
  logic ps;  // port select

  assign ps        = (addr == PORT_ADDR);
  assign db_out    = in_pins;
  assign db_out_en = ior & ps;

  if (LATCHED) begin : g_latch
    logic [DATA_W-1:0] held;
    always_latch begin
      if (iow && ps) held = db_in;
    end
    assign out_pins = held;
  end else begin : g_direct
    assign out_pins = (iow && ps) ? db_in : '0;
  end
endmodule
