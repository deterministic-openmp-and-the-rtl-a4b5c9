// tb_lbp_alu: single-cycle functional unit against a reference model, including the X_PAR
// identity operations p_merge and p_set and the six branch comparisons.
module tb_lbp_alu;
  import lbp_pkg::*;
  alu_e op;
  logic [31:0] a, b, y, ba, bb;
  logic [15:0] hid;
  logic [2:0] f3;
  logic taken;
  int checks = 0, failures = 0;

  lbp_alu dut (.op, .a, .b, .hart_id(hid), .br_f3(f3), .br_a(ba), .br_b(bb), .y, .taken);

  function automatic logic [31:0] ref_y(alu_e o, logic [31:0] x, logic [31:0] z, logic [15:0] h);
    case (o)
      A_ADD: return x + z;
      A_SUB: return x - z;
      A_SLL: return x << z[4:0];
      A_SLT: return ($signed(x) < $signed(z)) ? 1 : 0;
      A_SLTU: return (x < z) ? 1 : 0;
      A_XOR: return x ^ z;
      A_SRL: return x >> z[4:0];
      A_SRA: return 32'($signed(x) >>> z[4:0]);
      A_OR: return x | z;
      A_AND: return x & z;
      A_PASSB: return z;
      A_MERGE: return {1'b0, x[30:16], z[15:0]};
      default: return {1'b1, h[14:0], x[15:0]};
    endcase
  endfunction

  function automatic logic ref_t(logic [2:0] f, logic [31:0] x, logic [31:0] z);
    case (f)
      0: return x == z;
      1: return x != z;
      4: return $signed(x) < $signed(z);
      5: return $signed(x) >= $signed(z);
      6: return x < z;
      7: return x >= z;
      default: return 0;
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      op = alu_e'($urandom_range(0, 12));
      a = $urandom; b = $urandom; hid = 16'($urandom_range(0, 255));
      if (t % 5 == 0) b = a;
      f3 = 3'($urandom); ba = a; bb = b;
      #1;
      checks++;
      if (y !== ref_y(op, a, b, hid) || taken !== ref_t(f3, ba, bb)) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h y=%h", op.name(), a, b, y);
      end
    end
    // fixed X_PAR examples
    op = A_SET; a = 32'hffff_ffff; hid = 16'd13; #1;
    checks++; if (y != 32'h800d_ffff) failures++;
    op = A_MERGE; a = 32'h800d_ffff; b = 32'h0000_0006; #1;
    checks++; if (y != 32'h000d_0006) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
