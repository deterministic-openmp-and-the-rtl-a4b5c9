// lbp_xbar: N-by-N crossbar with a two-entry output buffer per port (router helper).
//
// Every input presents one item (valid, data, destination port). Each output port owns a
// two-entry buffer; in a cycle where that buffer has room, the output picks one of the
// inputs that target it, round-robin after the input it served last, and stores its item;
// that input sees ready. Every output moves one item per cycle, an item crosses in one cycle
// and different outputs work in parallel. Because the room test uses only the buffer's
// registered fill level, in_rdy never depends combinationally on a downstream ready, so
// chains of routers have no combinational path between them.
module lbp_xbar #(
  parameter int N = 5,
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_v   [N],
  input  logic [W-1:0] in_d   [N],
  input  logic [$clog2(N)-1:0] in_dst [N],
  output logic         in_rdy [N],
  output logic         out_v  [N],
  output logic [W-1:0] out_d  [N],
  input  logic         out_rdy[N]
);
  localparam int SW = $clog2(N);
  logic [SW-1:0] last [N];
  logic          gnt_v [N];
  logic [SW-1:0] gnt_i [N];

  logic [W-1:0] buf_d [N][2];
  logic [1:0]   fill  [N];
  logic         deq   [N];

  always_comb begin
    for (int o = 0; o < N; o++) begin
      gnt_v[o] = 1'b0;
      gnt_i[o] = '0;
      for (int k = 1; k <= N; k++) begin
        if (!gnt_v[o] && fill[o] != 2'd2 && in_v[(int'(last[o]) + k) % N] &&
            int'(in_dst[(int'(last[o]) + k) % N]) == o) begin
          gnt_v[o] = 1'b1;
          gnt_i[o] = SW'((int'(last[o]) + k) % N);
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      in_rdy[i] = 1'b0;
      for (int o = 0; o < N; o++)
        if (gnt_v[o] && int'(gnt_i[o]) == i) in_rdy[i] = 1'b1;
    end
  end

  always_comb begin
    for (int o = 0; o < N; o++) begin
      out_v[o] = fill[o] != 2'd0;
      out_d[o] = buf_d[o][0];
    end
  end

  always_comb
    for (int o = 0; o < N; o++) deq[o] = fill[o] != 2'd0 && out_rdy[o];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < N; o++) begin
        fill[o] <= '0;
        buf_d[o][0] <= '0;
        buf_d[o][1] <= '0;
        last[o] <= SW'(N - 1);
      end
    end else begin
      for (int o = 0; o < N; o++) begin
        if (gnt_v[o]) last[o] <= gnt_i[o];
        unique case ({gnt_v[o], deq[o]})
          2'b10: begin
            buf_d[o][fill[o][0]] <= in_d[gnt_i[o]];
            fill[o] <= fill[o] + 2'd1;
          end
          2'b01: begin
            buf_d[o][0] <= buf_d[o][1];
            fill[o] <= fill[o] - 2'd1;
          end
          2'b11: begin
            if (fill[o] == 2'd1) buf_d[o][0] <= in_d[gnt_i[o]];
            else begin buf_d[o][0] <= buf_d[o][1]; buf_d[o][1] <= in_d[gnt_i[o]]; end
          end
          default: ;
        endcase
      end
    end
  end
endmodule
