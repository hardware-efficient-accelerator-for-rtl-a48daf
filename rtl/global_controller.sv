// global_controller: sequences the timesteps of one image.
//
// After `start` it clears all neuron state and reseeds the LFSRs (CLEAR),
// then runs `num_steps` timesteps, each made of these phases:
//   GEN    15 cycles: image rows 0..13 are read from the image BRAMs (one
//          cycle of latency), turned into spikes by the LFSR generators and
//          written into the spike storages (wr_en/wr_row, one row per cycle).
//   PROC   the spike controller starts the storages and delivers weights;
//          the phase ends with the controller's `proc_done` pulse.
//   DRAIN  3 cycles, while the last summed weights reach the neurons.
//   UPD_E  1 cycle: excitatory neurons take one step (eq. 1-3).
//   UPD_I  1 cycle: inhibitory neurons take their partners' spikes and step
//          (eq. 4-5).
//   INHIB  1 cycle: excitatory neurons take the lateral inhibition.
// After the last timestep WB writes the 100 spike counts into the spike
// result BRAM (wb_en/wb_addr, one per cycle) and DONE pulses `done`.
// `cycles` counts the clock cycles from start to done.
//
// With the spike controller's handshake a timestep takes 26 + 50 * S cycles,
// S being the largest number of spikes held by one storage; an image takes
// 1 + (sum over timesteps) + 100 cycles.
// Following the published design: the phase contents (spike generation,
// synchronised weight delivery, neuron update, immediate lateral
// inhibition). This design's choices: the phase order, the drain length and
// the number of timesteps (set in the status buffer).
module global_controller
  import snn_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] num_steps,
  input  logic        proc_done,
  output phase_t      phase,
  output logic        clear,
  output logic [3:0]  img_addr,
  output logic        wr_en,
  output logic [3:0]  wr_row,
  output logic        upd_e,
  output logic        upd_i,
  output logic        inhib,
  output logic        wb_en,
  output logic [6:0]  wb_addr,
  output logic        busy,
  output logic        done,
  output logic [15:0] step,
  output logic [31:0] cycles
);

  logic [6:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase  <= PH_IDLE;
      cnt    <= '0;
      step   <= '0;
      cycles <= '0;
    end else begin
      if (phase != PH_IDLE && phase != PH_DONE) cycles <= cycles + 32'd1;
      unique case (phase)
        PH_IDLE: if (start) begin
          phase  <= PH_CLEAR;
          cycles <= '0;
          step   <= '0;
        end
        PH_CLEAR: begin
          phase <= (num_steps == 16'd0) ? PH_WB : PH_GEN;
          cnt   <= '0;
        end
        PH_GEN: begin
          cnt <= cnt + 7'd1;
          if (cnt == 7'(ROWS)) phase <= PH_PROC;
        end
        PH_PROC: if (proc_done) begin
          phase <= PH_DRAIN;
          cnt   <= '0;
        end
        PH_DRAIN: begin
          cnt <= cnt + 7'd1;
          if (cnt == 7'd2) phase <= PH_UPD_E;
        end
        PH_UPD_E: phase <= PH_UPD_I;
        PH_UPD_I: phase <= PH_INHIB;
        PH_INHIB: begin
          cnt  <= '0;
          step <= step + 16'd1;
          phase <= (step + 16'd1 == num_steps) ? PH_WB : PH_GEN;
        end
        PH_WB: begin
          cnt <= cnt + 7'd1;
          if (cnt == 7'(N_EXC - 1)) phase <= PH_DONE;
        end
        PH_DONE: phase <= PH_IDLE;
        default: phase <= PH_IDLE;
      endcase
    end
  end

  always_comb begin
    clear    = (phase == PH_CLEAR);
    img_addr = (cnt < 7'(ROWS)) ? 4'(cnt) : 4'd0;
    wr_en    = (phase == PH_GEN) && (cnt != 7'd0);
    wr_row   = 4'(cnt - 7'd1);
    upd_e    = (phase == PH_UPD_E);
    upd_i    = (phase == PH_UPD_I);
    inhib    = (phase == PH_INHIB);
    wb_en    = (phase == PH_WB);
    wb_addr  = cnt;
    busy     = (phase != PH_IDLE);
    done     = (phase == PH_DONE);
  end

endmodule
