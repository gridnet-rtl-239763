// bypass_gate: the gate in front of a node's optical by-pass switch driver.
//
// Each node sits in each fiber loop behind an optical by-pass switch. The
// switch coil must be driven (actuate = 1) to route light through the node;
// unpowered, the switch passes the light straight on and the node drops out
// of the loop. As the report describes, a gate in front of the driver lets
// selected failure conditions of the node force the by-pass too, besides
// loss of power. Which conditions are wired is not given; this design takes
// NCOND condition inputs and an enable mask that selects them.
//
// Combinational: actuate = power_good and no enabled failure condition.
module bypass_gate #(
  parameter int NCOND = 4
) (
  input  logic             power_good,
  input  logic [NCOND-1:0] fail,
  input  logic [NCOND-1:0] fail_en,
  output logic             actuate
);
  assign actuate = power_good && ((fail & fail_en) == '0);
endmodule
