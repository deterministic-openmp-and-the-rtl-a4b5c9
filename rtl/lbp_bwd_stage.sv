// lbp_bwd_stage: the stage of the backward line held by one core.
//
// The backward line is a unidirectional chain from the last core towards core 0 that
// carries results sent by p_swre and join addresses sent by a hart-ending p_ret, from a
// core to any core before it. Each core owns one register of the chain (down_*), which
// feeds the stage of the preceding core. A message arriving from the next core (up_*) is
// delivered to the own core when addressed to it (deliver_*, subject to the core's ready),
// otherwise it moves into the register. The own core injects (inj_*) only into a cycle the
// passing traffic leaves free, so traffic already on the line is never delayed by new
// messages. One message per cycle per hop.
module lbp_bwd_stage
  import lbp_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic [IDW-3:0] core_id,
  input  logic     up_v,
  input  bwd_msg_t up_msg,
  output logic     up_rdy,
  input  logic     inj_v,
  input  bwd_msg_t inj_msg,
  output logic     inj_rdy,
  output logic     deliver_v,
  output bwd_msg_t deliver_msg,
  input  logic     deliver_rdy,
  output logic     down_v,
  output bwd_msg_t down_msg,
  input  logic     down_rdy
);
  logic mine, reg_free, pass;

  assign mine        = up_msg.dst[IDW-1:2] == core_id;
  assign reg_free    = !down_v || down_rdy;
  assign deliver_v   = up_v && mine;
  assign deliver_msg = up_msg;
  assign pass        = up_v && !mine;
  assign up_rdy      = mine ? deliver_rdy : reg_free;
  assign inj_rdy     = reg_free && !pass;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      down_v   <= 1'b0;
      down_msg <= '0;
    end else if (reg_free) begin
      if (pass) begin
        down_v <= 1'b1; down_msg <= up_msg;
      end else if (inj_v) begin
        down_v <= 1'b1; down_msg <= inj_msg;
      end else begin
        down_v <= 1'b0;
      end
    end
  end
endmodule
