// li_relay: latency-insensitive pipeline register pair.
//
// One pipeline register (the primary) is paired with an ancillary register.
// Data move forward with a valid bit; a stop bit moves backward. While the
// primary holds a valid datum that the next stage stops, a datum arriving
// from the previous stage is saved in the ancillary register, and only then
// is stop raised towards the previous stage. Stop is therefore registered:
// a stall travels back one stage per cycle, and a stop that meets an invalid
// primary (a bubble) has no effect, as in the pipeline the core is built
// on. Throughput is one datum per cycle when nothing stops.
//
// Interface: in_valid/in_data/in_stop towards the previous stage (in_stop is
// an output), out_valid/out_data/out_stop towards the next stage. A datum is
// taken from the previous stage when in_valid && !in_stop, and handed on
// when out_valid && !out_stop. The previous stage must keep its datum while
// in_stop is high. RST_VALID/RST_DATA give the primary's reset contents
// (used to preload the boot instruction); the ancillary resets empty.
// The primary/ancillary pair follows the design; clock gating of the
// registers is expressed as load enables.
module li_relay #(
  parameter type T = logic [31:0],
  parameter bit  RST_VALID = 1'b0,
  parameter T    RST_DATA = T'(0)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  T     in_data,
  output logic in_stop,
  output logic out_valid,
  output T     out_data,
  input  logic out_stop
);
  logic main_v, aux_v;
  T     main_d, aux_d;

  wire take = in_valid && !aux_v;            // previous stage not stopped
  wire give = main_v && !out_stop;            // primary handed on

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      main_v <= RST_VALID;
      main_d <= RST_DATA;
      aux_v  <= 1'b0;
      aux_d  <= T'(0);
    end else if (!main_v || give) begin
      // primary free after this cycle: refill from ancillary first
      if (aux_v) begin
        main_v <= 1'b1;
        main_d <= aux_d;
        aux_v  <= 1'b0;
      end else begin
        main_v <= take;
        if (take) main_d <= in_data;
      end
    end else if (take) begin
      // primary stopped: save the incoming datum
      aux_v <= 1'b1;
      aux_d <= in_data;
    end
  end

  assign in_stop   = aux_v;
  assign out_valid = main_v;
  assign out_data  = main_d;

  // The ancillary register is only used while the primary is occupied.
  a_aux_needs_main: assert property (@(posedge clk) disable iff (!rst_n) aux_v |-> main_v);
endmodule
