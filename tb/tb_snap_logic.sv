// tb_snap_logic: self-checking test of the logic function block.
// Checks AND, OR, XOR and AND-NOT on random operands bit by bit.
module tb_snap_logic;
  logic [15:0] a, b, y;
  logic [1:0] op;
  int checks = 0, failures = 0;

  snap_logic #(.W(16)) dut (.a, .b, .op, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      logic [15:0] e;
      a = 16'($urandom); b = 16'($urandom); op = 2'(i % 4);
      #1;
      for (int k = 0; k < 16; k++)
        case (op)
          2'd0: e[k] = a[k] && b[k];
          2'd1: e[k] = a[k] || b[k];
          2'd2: e[k] = a[k] != b[k];
          default: e[k] = a[k] && !b[k];
        endcase
      checks++;
      if (y !== e) begin
        failures++;
        $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", op, a, b, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
