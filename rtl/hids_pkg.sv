// hids_pkg: types and constants shared by the hardware intrusion detection
// system (HIDS) that watches a RISC-V network processor while it parses
// received radio packets.
//
// The event numbering follows the order of the hardware events the
// processor's performance monitor exposes (cycles, retired instructions,
// load-use stalls, jump stalls, fetch wait cycles, loads, stores, jumps,
// branches, taken branches, compressed instructions). Bit i of an event
// vector and of an mhpmevent selector is event i of that list. The CSR
// addresses are those of the RISC-V privileged specification.
package hids_pkg;

  localparam int unsigned NUM_EVENTS = 11;

  typedef enum logic [3:0] {
    EV_CYCLES       = 4'd0,
    EV_INSTR        = 4'd1,
    EV_LD_STALL     = 4'd2,
    EV_JMP_STALL    = 4'd3,
    EV_IMISS        = 4'd4,
    EV_LD           = 4'd5,
    EV_ST           = 4'd6,
    EV_JUMP         = 4'd7,
    EV_BRANCH       = 4'd8,
    EV_BRANCH_TAKEN = 4'd9,
    EV_COMP_INSTR   = 4'd10
  } hpm_event_e;

  typedef logic [NUM_EVENTS-1:0] event_vec_t;

  // Result of the decision tree.
  typedef enum logic [1:0] {
    CLS_LEGITIMATE     = 2'd0,
    CLS_HEAP_OVERFLOW  = 2'd1,
    CLS_STACK_OVERFLOW = 2'd2
  } pkt_class_e;

  // Machine-mode counter CSRs (RISC-V privileged specification).
  // Counter n sits at BASE + n: mcountinhibit at 0x320, mhpmevent3 at
  // 0x323, mcycle at 0xB00, mhpmcounter3 at 0xB03, mcycleh at 0xB80.
  localparam logic [11:0] CSR_MCOUNTINHIBIT = 12'h320;
  localparam logic [11:0] CSR_MHPMEVENT_BASE = 12'h320;
  localparam logic [11:0] CSR_MCOUNTER_BASE  = 12'hB00;
  localparam logic [11:0] CSR_MCOUNTERH_BASE = 12'hB80;

  // Counter numbers 0..31 as in mcountinhibit; 0 = mcycle, 2 = minstret,
  // 3 onward = mhpmcounter3, mhpmcounter4, ...
  localparam int unsigned FIRST_HPM = 3;

  // Event selector loaded into mhpmevent(FIRST_HPM+k) at reset: the first
  // programmable counter watches load-use stalls, the second taken
  // branches, the two events the decision tree uses. Firmware may rewrite
  // the selectors through the CSR port.
  function automatic event_vec_t default_event_sel(int unsigned k);
    event_vec_t sel;
    sel = '0;
    if (k == 0) sel[EV_LD_STALL]     = 1'b1;
    if (k == 1) sel[EV_BRANCH_TAKEN] = 1'b1;
    return sel;
  endfunction

endpackage
