// Shared definitions of the shared multibuffer ATM switch.
//
// A cell is the 53-byte ATM cell, kept whole as one memory word in the shared
// buffer memories (SBMs). On the byte-serial links a cell slot lasts
// SLOT_CYCLES clocks: one routing-tag byte followed by the 53 cell bytes. At a
// 20 MHz byte clock a 54-cycle slot lasts 2.70 us, shorter than the 2.73 us an
// STM-1 (155.52 Mbit/s) link needs for one cell, so every port keeps up with
// an STM-1 source.
//
// Inside a slot the controllers work at fixed slot cycles: one write cycle,
// three SBM read cycles, the output decision, and the return of freed
// addresses to the idle address queues. The cell format, the tag byte and the
// cycle plan are this design's choices; the one write and three reads per
// slot follow the switch architecture.
package switch_pkg;

  localparam int CELL_BYTES  = 53;
  localparam int SLOT_CYCLES = CELL_BYTES + 1;
  localparam int T_W         = $clog2(SLOT_CYCLES);

  typedef logic [CELL_BYTES-1:0][7:0] cell_t;
  typedef logic [T_W-1:0]             slot_cycle_t;

  // Routing tag, the first byte of every slot on an input link.
  //   valid : a cell follows in this slot
  //   mcast : 1 = multicast cell, dest is its MCI; 0 = unicast, dest is the output port
  typedef struct packed {
    logic       valid;
    logic       mcast;
    logic [5:0] dest;
  } tag_t;

  // Cycle plan of one slot (slot cycle numbers 0 .. SLOT_CYCLES-1).
  localparam int T_WRITE  = 1;   // all incoming cells written to SBMs, addresses queued
  localparam int T_READ1  = 2;   // read cycles 1, 2, 3 are T_READ1 .. T_READ1+2
  localparam int N_READS  = 3;
  localparam int T_DECIDE = T_READ1 + N_READS + 1; // all read data is back: output mask decides
  localparam int T_UFREE  = T_DECIDE + 1;          // unicast address of port p freed at T_UFREE+p
  localparam int T_MFREE  = T_UFREE + 8;           // oldest cell of MCI m freed at T_MFREE+m
  localparam int T_LOAD   = SLOT_CYCLES - 1;       // output cells move into the output links

endpackage
