// spike_controller: synchronises the seven spike storages.
//
// Watches the storages' Ready and Busy signals. As soon as at least one
// storage is ready it broadcasts a one-cycle Start; every storage that is
// ready in that cycle enters Busy together, so their weight requests line up
// cycle for cycle. Once all storages have left Busy (and none is waiting in
// Ready) it pulses `done`, which tells the global controller that every
// spike of the timestep has had its weights delivered.
//
// Interface: ready/busy are per-storage levels, start and done are one-cycle
// pulses registered on the clock. Synchronous active-low reset.
//
// Following the published design: the three control signals Ready, Busy and Start and the
// rule that Start is broadcast when at least one storage is ready. This
// design's choices: the `done` pulse and its two-state sequencing.
module spike_controller
  import snn_pkg::*;
#(
  parameter int unsigned N = N_LANES
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] ready,
  input  logic [N-1:0] busy,
  output logic         start,
  output logic         done
);

  typedef enum logic {C_WAIT, C_RUN} cst_t;
  cst_t st;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st    <= C_WAIT;
      start <= 1'b0;
      done  <= 1'b0;
    end else begin
      start <= 1'b0;
      done  <= 1'b0;
      unique case (st)
        C_WAIT: if (|ready) begin
          start <= 1'b1;
          st    <= C_RUN;
        end
        C_RUN: if (!start && !(|busy) && !(|ready)) begin
          done <= 1'b1;
          st   <= C_WAIT;
        end
        default: st <= C_WAIT;
      endcase
    end
  end

endmodule
