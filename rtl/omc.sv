// omc: operating mode controller of one DARKMEM unit.
//
// A finite state machine that moves all SRAM banks of the unit between the
// three operating modes (active, deep-sleep, idle) when the accelerator asks
// for it. The accelerator uses a valid/ready handshake: it drives req_mode
// and raises req_valid, holds both, and may go on (and access the memory)
// only in the cycle where req_ready is high. req_ready is high exactly when
// the banks have settled in the requested mode, so a request for the mode
// already in force completes at once, while a real change stalls the
// accelerator for the transition time. This keeps every memory access out
// of a mode transition, as the document requires.
//
// Transition timing (each wait is counted in cycles by this FSM):
//   to idle, or between idle and active ........ PG_LAT
//   active/idle -> deep-sleep .................. PG_LAT, then VC_LAT while
//                                                the cell supply is lowered
//   deep-sleep -> active ....................... VC_LAT while the supply is
//                                                raised, then PG_LAT
// With USE_VC = 0 (dual-rail SRAMs without voltage controller) the VC_LAT
// steps are skipped and vc_low stays 0. With DUAL_RAIL = 0 (single-rail
// SRAMs with a voltage controller) deep-sleep leaves the pins alone and only
// lowers the supply, so the PG_LAT steps into and out of deep-sleep are
// skipped; idle still gates the whole bank. req_ready rises the stated
// number of cycles plus one after the request is first seen.
// The three modes, the pins they drive, the handshake signals and the use of
// the power-gating and voltage-controller latencies follow the document. The
// order of the supply and gating steps, the reset mode (active), and the
// exact handshake timing are this design's choices, as is the single-rail
// variant's use of the pins in idle.
module omc
  import darkmem_pkg::*;
#(
  parameter int unsigned PG_LAT = 10,
  parameter int unsigned VC_LAT = 64,
  parameter bit          USE_VC = 1'b1,
  parameter bit          DUAL_RAIL = 1'b1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  pmode_e req_mode,
  input  logic   req_valid,
  output logic   req_ready,
  output logic   pgl,
  output logic   pgm,
  output logic   vc_low,
  output pmode_e cur_mode,
  output logic   busy
);

  localparam int unsigned CW = $clog2(((PG_LAT > VC_LAT) ? PG_LAT : VC_LAT) + 1);

  typedef enum logic [1:0] {
    ST_STABLE,   // banks settled in cur_mode
    ST_VC_UP,    // waiting for the cell supply to return to nominal
    ST_PG,       // waiting for the sleep transistors
    ST_VC_DOWN   // waiting for the cell supply to reach retention voltage
  } state_e;

  state_e   state;
  pmode_e   tgt;
  logic [CW-1:0] cnt;
  pg_pins_t pins;

  // Pins of a mode for the SRAM type in use. A single-rail SRAM cannot gate
  // its periphery on its own, so its deep-sleep is the supply reduction alone.
  function automatic pg_pins_t pins_for(pmode_e m);
    if (!DUAL_RAIL && m == PM_DEEP_SLEEP) return pins_of(PM_ACTIVE);
    return pins_of(m);
  endfunction

  assign pgl       = pins.pgl;
  assign pgm       = pins.pgm;
  assign busy      = (state != ST_STABLE);
  assign req_ready = req_valid && (state == ST_STABLE) && (req_mode == cur_mode);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_STABLE;
      cur_mode <= PM_ACTIVE;
      tgt      <= PM_ACTIVE;
      pins     <= pins_of(PM_ACTIVE);
      vc_low   <= 1'b0;
      cnt      <= '0;
    end else begin
      unique case (state)
        ST_STABLE: begin
          if (req_valid && req_mode != cur_mode) begin
            tgt <= req_mode;
            if (USE_VC && vc_low && req_mode == PM_ACTIVE) begin
              // raise the cell supply before the periphery wakes up
              vc_low <= 1'b0;
              cnt    <= CW'(VC_LAT - 1);
              state  <= ST_VC_UP;
            end else begin
              // gating the cells needs no supply ramp: drop the request now
              if (req_mode == PM_IDLE) vc_low <= 1'b0;
              if (pins_for(req_mode) != pins) begin
                pins  <= pins_for(req_mode);
                cnt   <= CW'(PG_LAT - 1);
                state <= ST_PG;
              end else if (USE_VC && req_mode == PM_DEEP_SLEEP) begin
                // nothing to gate: go straight to the supply reduction
                vc_low <= 1'b1;
                cnt    <= CW'(VC_LAT - 1);
                state  <= ST_VC_DOWN;
              end else begin
                cur_mode <= req_mode;
              end
            end
          end
        end
        ST_VC_UP: begin
          if (cnt == '0) begin
            if (pins_for(tgt) != pins) begin
              pins  <= pins_for(tgt);
              cnt   <= CW'(PG_LAT - 1);
              state <= ST_PG;
            end else begin
              cur_mode <= tgt;
              state    <= ST_STABLE;
            end
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        ST_PG: begin
          if (cnt == '0) begin
            if (USE_VC && tgt == PM_DEEP_SLEEP) begin
              vc_low <= 1'b1;
              cnt    <= CW'(VC_LAT - 1);
              state  <= ST_VC_DOWN;
            end else begin
              cur_mode <= tgt;
              state    <= ST_STABLE;
            end
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        ST_VC_DOWN: begin
          if (cnt == '0) begin
            cur_mode <= tgt;
            state    <= ST_STABLE;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: state <= ST_STABLE;
      endcase
    end
  end

  // Handshake rule: once raised, a request is held unchanged until ready.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
      (req_valid && !req_ready) |=> (req_valid && $stable(req_mode)))
    else $error("omc: request dropped or changed before ready");

  // Only the three defined modes are requested.
  a_req_legal: assert property (@(posedge clk) disable iff (!rst_n)
      req_valid |-> (req_mode inside {PM_ACTIVE, PM_DEEP_SLEEP, PM_IDLE}))
    else $error("omc: illegal mode request");

endmodule
