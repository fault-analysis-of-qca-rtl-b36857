// hdlq_pkg: types shared by the fault-injectable QCA device models and the
// half adder built from them.
//
// A QCA cell encodes logic 1 as polarization +1 and logic 0 as -1; every
// signal here is one such polarization.  Each faultable device carries the
// auxiliary fault-injection inputs of its HDLQ-style model (majority voter:
// fault0/fault1; inverter, fanout, L-shaped wire: fault), and ha_fault_t
// gathers those of the whole half adder into one bundle.  qca_phase_t names
// the four phases every QCA clock zone passes through.
package hdlq_pkg;

  // Number of clock zones (and of clock phases) of the QCA clock.
  localparam int unsigned QCA_ZONES = 4;

  // Phase of one clock zone, in the order a zone passes through them.
  typedef enum logic [1:0] {
    PH_SWITCH  = 2'd0,  // barriers rising: cells take their drivers' polarization
    PH_HOLD    = 2'd1,  // barriers high: cells hold and drive the next zone
    PH_RELEASE = 2'd2,  // barriers falling: cells lose their polarization
    PH_RELAX   = 2'd3   // barriers low: cells unpolarized
  } qca_phase_t;

  // Fault-injection inputs of the half adder, one field per device.
  // Index 0 of each vector is device 1 (MV1, INV1, Fanout1, L-shaped wire 1).
  typedef struct packed {
    logic [3:0] mv_fault0;     // MV1..MV4 fault0
    logic [3:0] mv_fault1;     // MV1..MV4 fault1
    logic [1:0] inv_fault;     // INV1, INV2
    logic [1:0] fanout_fault;  // Fanout1, Fanout2
    logic [5:0] lwire_fault;   // L-shaped wires 1..6
  } ha_fault_t;

  localparam ha_fault_t HA_FAULT_FREE = '0;

endpackage
