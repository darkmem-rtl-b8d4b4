// darkmem_pkg: types shared by the DARKMEM power-managed local memory.
//
// A dual-rail SRAM bank has two power-gating pins, PGL (periphery) and PGM
// (memory cells). Together they give three operating modes, which the
// accelerator requests from the operating mode controller (OMC) of each unit:
//   ACTIVE     periphery and cells powered; reads and writes allowed
//   DEEP_SLEEP periphery gated, cells powered (optionally at retention
//              voltage); data kept, no access allowed
//   IDLE       periphery and cells gated; data lost
// The three modes and their pin meaning follow the document. The 2-bit
// encoding, the pin polarity (1 = gated) and the pin record are choices of
// this design.
package darkmem_pkg;

  typedef enum logic [1:0] {
    PM_ACTIVE     = 2'd0,
    PM_DEEP_SLEEP = 2'd1,
    PM_IDLE       = 2'd2
  } pmode_e;

  // Power-gating pin values of one bank, 1 = gated.
  typedef struct packed {
    logic pgl;
    logic pgm;
  } pg_pins_t;

  function automatic pg_pins_t pins_of(pmode_e m);
    pg_pins_t p;
    unique case (m)
      PM_ACTIVE:     p = '{pgl: 1'b0, pgm: 1'b0};
      PM_DEEP_SLEEP: p = '{pgl: 1'b1, pgm: 1'b0};
      default:       p = '{pgl: 1'b1, pgm: 1'b1};
    endcase
    return p;
  endfunction

endpackage
