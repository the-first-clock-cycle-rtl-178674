// tb_ora_cell: checks the comparison ORA (set by configuration, cleared and held by
// any mismatch seen while enabled, blind while disabled) and its carry-chain stage,
// for two and one compared pairs.
module tb_ora_cell;
  logic       clk = 1'b0, gsr = 1'b0, ce, cin;
  logic [1:0] a2, b2;
  logic       a1, b1;
  logic       f2, f1, co2, co1;
  logic       e2, e1;
  int checks = 0, failures = 0;

  ora_cell #(.NPAIR(2)) dut2 (.clk, .gsr, .ce, .a(a2), .b(b2), .carry_in(cin), .flag(f2), .carry_out(co2));
  ora_cell #(.NPAIR(1)) dut1 (.clk, .gsr, .ce, .a(a1), .b(b1), .carry_in(cin), .flag(f1), .carry_out(co1));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int run = 0; run < 20; run++) begin
      #1 gsr = 1'b1; ce = 1'b0; cin = 1'b0; a2 = '0; b2 = '0; a1 = 0; b1 = 0;
      #3 gsr = 1'b0;
      e2 = 1'b1; e1 = 1'b1;
      for (int n = 0; n < 40; n++) begin
        @(negedge clk);
        ce  = $urandom % 2;
        cin = $urandom % 2;
        a2 = 2'($urandom); b2 = a2; a1 = 1'($urandom); b1 = a1;
        if ($urandom % 16 == 0) b2 = b2 ^ 2'(1 << ($urandom % 2));
        if ($urandom % 16 == 0) b1 = ~b1;
        #1;
        checks += 2;
        if (co2 !== (e2 ? cin : 1'b1)) begin failures++; $display("carry2"); end
        if (co1 !== (e1 ? cin : 1'b1)) begin failures++; $display("carry1"); end
        @(posedge clk);
        if (ce && a2 != b2) e2 = 1'b0;
        if (ce && a1 != b1) e1 = 1'b0;
        #1;
        checks += 2;
        if (f2 !== e2) begin failures++; $display("flag2 run %0d n %0d", run, n); end
        if (f1 !== e1) begin failures++; $display("flag1 run %0d n %0d", run, n); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
