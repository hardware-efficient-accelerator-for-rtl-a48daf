// status_buffer: host-visible control and status registers.
//
// Register map (32-bit words, byte offset):
//   0x00 CONTROL  write bit 0 = 1 starts one image (one-cycle `start` pulse)
//   0x04 STATUS   bit 0 busy, bit 1 done (set in the last cycle of an
//                 image, cleared by the next start)
//   0x08 STEPS    number of timesteps per image (read/write)
//   0x0C CYCLES   clock cycles taken by the last image
//   0x10 STEP     current timestep
//   0x14 PHASE    current phase of the global controller
// Writes take effect at the clock edge of wr_en; reads return on the cycle
// after rd_en. Synchronous active-low reset.
//
// Following the published design: a status buffer between the AXI4-Lite port and the
// global controller. This design's choices: the whole register map.
module status_buffer
  import snn_pkg::*;
#(
  parameter int unsigned DEFAULT_STEPS = 700
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [31:0] wr_addr,
  input  logic [31:0] wr_data,
  input  logic        rd_en,
  input  logic [31:0] rd_addr,
  output logic [31:0] rd_data,
  output logic        start,
  output logic [15:0] num_steps,
  input  logic        busy,
  input  logic        done,
  input  logic [31:0] cycles,
  input  logic [15:0] step,
  input  phase_t      phase
);

  logic done_flag;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      start     <= 1'b0;
      done_flag <= 1'b0;
      num_steps <= 16'(DEFAULT_STEPS);
    end else begin
      start <= 1'b0;
      if (done) done_flag <= 1'b1;
      if (wr_en) begin
        unique case (wr_addr[4:2])
          3'd0: if (wr_data[0]) begin
            start     <= 1'b1;
            done_flag <= 1'b0;
          end
          3'd2: num_steps <= wr_data[15:0];
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rd_data <= '0;
    else if (rd_en) begin
      unique case (rd_addr[4:2])
        3'd1:    rd_data <= {30'd0, done_flag || done, busy && !done};
        3'd2:    rd_data <= {16'd0, num_steps};
        3'd3:    rd_data <= cycles;
        3'd4:    rd_data <= {16'd0, step};
        3'd5:    rd_data <= {28'd0, phase};
        default: rd_data <= '0;
      endcase
    end
  end

endmodule
