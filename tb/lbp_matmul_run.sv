// lbp_matmul_run: runs the matrix multiplication of lbp_matmul_prog_pkg on an NC-core LBP
// (h = 4*NC harts, default-size banks) and checks every element of Z against the
// reference. VERSION selects the base, copy or distributed version. Used by tb_lbp_matmul, once per machine size
// and version. Loads the program while reset
// is held, releases reset, waits for exit, then compares Z (read straight from the shared
// bank arrays) and reports cycles, retired instructions and IPC. Outputs done when the
// checks are over, with the number of checks and failures.
module lbp_matmul_run #(
  parameter int NC = 4,
  parameter int VERSION = 0           // 0 base, 1 copy, 2 distributed
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   cycles
);
  import lbp_matmul_prog_pkg::*;
  localparam int SHW = 4096;
  localparam int H = 4 * NC;

  logic rst_n = 1'b0;
  logic prog_we = 1'b0;
  logic [11:0] prog_addr = '0;
  logic [31:0] prog_wdata = '0;
  logic exit_o;
  logic [63:0] retire_cnt;
  logic [4*NC-1:0] busy;
  logic [15:0] ev [NC];
  logic [31:0] prog [$];

  lbp_top #(.NCORES(NC)) dut (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_wdata, .exit_o, .retire_cnt_o(retire_cnt),
    .hart_busy_o(busy), .ev_o(ev));

  logic [11:0] peek_addr = '0;
  logic [31:0] peek_data [NC];
  for (genvar c = 0; c < NC; c++) begin : g_peek
    assign peek_data[c] = dut.g_core[c].u_shared.mem[peek_addr];
  end

  initial begin
    done = 1'b0; checks = 0; failures = 0; cycles = 0;
  end

  always @(posedge clk) if (rst_n && !exit_o) cycles++;

  initial begin
    int bad;
    bad = 0;
    build(NC, VERSION, prog);
    repeat (3) @(posedge clk);
    foreach (prog[i]) begin
      prog_we <= 1'b1; prog_addr <= 12'(i); prog_wdata <= prog[i];
      @(posedge clk);
    end
    prog_we <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1;
    wait (exit_o);
    repeat (5) @(posedge clk);
    $display("matmul %s, %0d cores (h=%0d): %0d cycles, %0d instructions retired, IPC x100 = %0d",
             VERSION == 1 ? "copy" : VERSION == 2 ? "distributed" : "base", NC, H, cycles, retire_cnt, int'(retire_cnt * 100 / cycles));
    for (int i = 0; i < H; i++)
      for (int j = 0; j < H; j++) begin
        int gw;
        int bk, wd;
        gw = H * H + i * H + j;
        bk = gw / SHW;
        wd = gw % SHW;
        if (VERSION == 2) begin bk = i % NC; wd = 4 * H + (i / NC) * H + j; end
        peek_addr = 12'(wd);
        #1;
        checks++;
        if (peek_data[bk] != 32'(z_ref(H, i, j))) begin
          failures++;
          if (bad++ < 5) $display("FAIL: Z[%0d][%0d] = %0d, expected %0d", i, j,
                                  peek_data[bk], z_ref(H, i, j));
        end
      end
    checks++;
    if (busy != '0) begin failures++; $display("FAIL: harts still busy after exit"); end
    done = 1'b1;
  end
endmodule
