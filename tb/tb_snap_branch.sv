// tb_snap_branch: self-checking test of the conditional-branch block.
// Tests every condition code on zero, positive, negative and random values.
module tb_snap_branch;
  logic [15:0] v;
  logic [3:0] cond;
  logic taken;
  int checks = 0, failures = 0;

  snap_branch dut (.v, .cond, .taken);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] vals [6] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h1230};
    for (int k = 0; k < 6 + 50; k++) begin
      for (int c = 0; c < 16; c++) begin
        logic e;
        v = (k < 6) ? vals[k] : 16'($urandom);
        cond = 4'(c);
        #1;
        case (c)
          0: e = (v == 0);
          1: e = (v != 0);
          2: e = ($signed(v) < 0);
          3: e = ($signed(v) >= 0);
          4: e = 1'b1;
          default: e = 1'b0;
        endcase
        checks++;
        if (taken !== e) begin
          failures++;
          $display("FAIL v=%h cond=%0d taken=%b exp=%b", v, c, taken, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
