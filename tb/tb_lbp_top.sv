// tb_lbp_top: end-to-end test of a 4-core (16-hart) LBP.
//
// Loads the team program of lbp_team_prog_pkg into the code banks, releases reset and
// runs until main exits. Checks every member's word in the shared banks, the two values
// passed through result buffers, and the sum main computed after the join. It also counts
// each mechanism of the design from the cores' event outputs (local and next-core forks,
// continuation values local and over the forward link, hart starts, p_swre direct and over
// the backward line, p_lwre and p_lwre waiting, joins, ending-hart signals and p_ret held
// for them, a hart waiting for a join, distant memory accesses, multiplications and
// p_syncm holding fetch) and counts a failure for any that never happened.
module tb_lbp_top;
  import lbp_pkg::*;
  import lbp_team_prog_pkg::*;

  localparam int NC = 4;
  localparam int SHW = 4096;
  localparam int SH_SHIFT = $clog2(SHW) + 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic prog_we = 1'b0;
  logic [11:0] prog_addr = '0;
  logic [31:0] prog_wdata = '0;
  logic exit_o;
  logic [63:0] retire_cnt;
  logic [4*NC-1:0] busy;
  logic [15:0] ev [NC];
  int checks = 0, failures = 0;
  int cycles = 0;
  int evc [16];
  logic [31:0] prog [$];

  lbp_top #(.NCORES(NC)) dut (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_wdata, .exit_o, .retire_cnt_o(retire_cnt),
    .hart_busy_o(busy), .ev_o(ev));

  always #5 clk = ~clk;

  // read access to the shared banks for the final checks
  logic [11:0] peek_addr = '0;
  logic [31:0] peek_data [NC];
  for (genvar c = 0; c < NC; c++) begin : g_peek
    assign peek_data[c] = dut.g_core[c].u_shared.mem[peek_addr];
  end

  task automatic peek(input int bank, input int word, output logic [31:0] v);
    peek_addr = 12'(word);
    #1;
    v = peek_data[bank];
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cycles++;
    for (int c = 0; c < NC; c++)
      for (int b = 0; b < 16; b++) evc[b] += int'(ev[c][b]);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    string names [16] = '{"fork_local", "fork_next", "cv_local", "cv_next", "start",
                          "swre_local", "swre_line", "lwre", "join", "end_signal",
                          "wait_for_join", "syncm_hold", "remote_access", "muldiv",
                          "pret_waits_end_signal", "lwre_waits"};
    for (int b = 0; b < 16; b++) evc[b] = 0;
    build(NC, SH_SHIFT, prog);
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
    $display("run: %0d cycles, %0d instructions retired, IPC x100 = %0d", cycles, retire_cnt,
             int'(retire_cnt * 100 / cycles));
    for (int i = 0; i < 4 * NC; i++) begin
      peek(i % NC, i, v);
      check(v == 32'(i * i + 1), $sformatf("member %0d word = %0d", i, v));
    end
    peek(0, 500, v);
    check(v == 32'd5, "result buffer 1 (backward line)");
    peek(0, 501, v);
    check(v == 32'd1, "result buffer 2 (same core)");
    peek(0, 502, v);
    check(v == 32'(expected_sum(NC)), $sformatf("sum after join = %0d", v));
    check(busy == '0, "all harts free after exit");
    for (int b = 0; b < 16; b++) begin
      $display("event %-22s %0d", names[b], evc[b]);
      check(evc[b] > 0, $sformatf("mechanism %s never happened", names[b]));
    end
    check(evc[0] == 3 * NC, "one p_fc per hart except the last of each core");
    check(evc[1] == NC - 1, "one p_fn per core boundary");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
