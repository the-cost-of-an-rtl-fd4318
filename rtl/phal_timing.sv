// phal_timing: time-slot generator of a P-HAL node.
//
// Time is divided into slots of SLOT_CYCLES clocks; slots pace task execution
// and data distribution across all platforms of an application. A phase
// counter runs from 0 to SLOT_CYCLES-1; slot_tick is high for the one cycle in
// which the phase is 0, and slot_num counts slots. A synchronisation (load)
// restarts the current slot at phase 0 with slot number load_value, so nodes
// that receive the same synchronisation packet run aligned slots. The slot
// concept is the original platform's; the slot length and the way of
// synchronising are this design's own.
module phal_timing #(
  parameter int SLOT_CYCLES = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [31:0] load_value,
  output logic        slot_tick,
  output logic [31:0] slot_num
);

  localparam int PW = (SLOT_CYCLES > 1) ? $clog2(SLOT_CYCLES) : 1;
  logic [PW-1:0] phase;

  assign slot_tick = (phase == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase    <= '0;
      slot_num <= '0;
    end else if (load) begin
      phase    <= '0;
      slot_num <= load_value;
    end else if (phase == PW'(SLOT_CYCLES-1)) begin
      phase    <= '0;
      slot_num <= slot_num + 1'b1;
    end else begin
      phase    <= phase + 1'b1;
    end
  end

endmodule
