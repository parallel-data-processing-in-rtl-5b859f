// eo_iter_sorter_hls: iterative even-odd transition sorter with a
// start/done block protocol (ap_ctrl_hs style), matching the interface of the
// block produced from the lecture's C++ sorter after loop unrolling and
// pipelining of the sort loop with an initiation interval of one.
//
// Protocol (all signals synchronous to ap_clk, ap_rst synchronous, active high):
//   ap_idle   high while no sort is in progress.
//   ap_start  sampled while idle; when high, input_data_v is captured into
//             the work register on that clock edge.
//   ap_done   one-clock pulse; ap_return holds the sorted word from that cycle
//             until the next ap_done (it is a register).
//   ap_ready  pulses together with ap_done: a new input can be taken. If
//             ap_start is still high after ap_done, a new sort begins.
// Each clock in the sort state applies the even line and then the odd line of
// comparators to the work register. The loop ends with the first pass that
// swaps nothing, as in the C++ while-loop. Latency: ap_done rises on the
// k+1-th clock edge after the edge that captured the input, for data that
// needs k passes (k <= N/2). Result ordering: item 0 (least significant) holds the largest
// value, item N-1 the smallest, as the C++ code produces.
//
// The block itself is the lecture's; the exact state encoding, the held
// result register and the reset values are this design's own choices.
module eo_iter_sorter_hls
  import sort_pkg::*;
#(
  parameter int unsigned M = 8,    // item width in bits
  parameter int unsigned N = 16    // number of items, even
) (
  input  logic           ap_clk,
  input  logic           ap_rst,
  input  logic           ap_start,
  output logic           ap_done,
  output logic           ap_idle,
  output logic           ap_ready,
  input  logic [N*M-1:0] input_data_v,
  output logic [N*M-1:0] ap_return
);

  hs_state_t      state;
  logic [N*M-1:0] work;
  logic [N*M-1:0] pass_out;
  logic           completed;

  eot_two_lines #(.M(M), .N(N)) u_lines (
    .data_in (work),
    .data_out(pass_out)
  );

  assign completed = (pass_out == work);

  always_ff @(posedge ap_clk) begin
    if (ap_rst) begin
      state     <= HS_IDLE;
      work      <= '0;
      ap_return <= '0;
    end else begin
      unique case (state)
        HS_IDLE: begin
          if (ap_start) begin
            work  <= input_data_v;
            state <= HS_SORT;
          end
        end
        HS_SORT: begin
          work <= pass_out;
          if (completed) begin
            ap_return <= work;
            state     <= HS_DONE;
          end
        end
        HS_DONE: begin
          if (ap_start) begin
            work  <= input_data_v;
            state <= HS_SORT;
          end else begin
            state <= HS_IDLE;
          end
        end
        default: state <= HS_IDLE;
      endcase
    end
  end

  assign ap_done  = (state == HS_DONE);
  assign ap_ready = (state == HS_DONE);
  assign ap_idle  = (state == HS_IDLE);

  // Protocol rules of the block interface.
  a_done_not_idle: assert property (@(posedge ap_clk) disable iff (ap_rst)
    ap_done |-> !ap_idle);
  a_done_single: assert property (@(posedge ap_clk) disable iff (ap_rst)
    ap_done |=> !ap_done);

endmodule
