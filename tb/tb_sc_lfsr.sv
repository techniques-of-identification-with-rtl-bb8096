// tb_sc_lfsr: checks that the noise source visits every value 1..2**W-1 exactly once per
// period (W = 8 and W = 5), never produces zero, and holds while en is OFF. It also checks
// that successive numbers are not single shifts of each other (r' = r>>1 or (r>>1)^mask,
// mask 8'hB8), which a register advanced one shift per clock would always produce.
module tb_sc_lfsr;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] r8;
  logic [4:0] r5;
  int checks = 0, failures = 0;
  int seen8 [256];
  int single = 0;
  int seen5 [32];

  sc_lfsr #(.W(8), .SEED(8'h01)) dut8 (.clk, .rst_n, .en, .rnd(r8));
  sc_lfsr #(.W(5), .SEED(5'h09)) dut5 (.clk, .rst_n, .en, .rnd(r5));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++; checks++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] held;
    repeat (2) @(posedge clk);
    rst_n = 1; en = 1;
    for (int i = 0; i < 255; i++) begin
      automatic logic [7:0] prev = r8;
      @(negedge clk);
      if (i > 0 && (r8 == (prev >> 1) || r8 == ((prev >> 1) ^ 8'hB8))) single++;
      seen8[r8]++;
      if (i < 31) seen5[r5]++;
    end
    checks++; if (single > 12) begin failures++; $display("%0d successive numbers were single shifts", single); end
    checks++; if (seen8[0] != 0) begin failures++; $display("W=8 produced zero"); end
    for (int v = 1; v < 256; v++) begin
      checks++;
      if (seen8[v] != 1) begin failures++; $display("W=8 value %0d seen %0d times", v, seen8[v]); end
    end
    for (int v = 1; v < 32; v++) begin
      checks++;
      if (seen5[v] != 1) begin failures++; $display("W=5 value %0d seen %0d times", v, seen5[v]); end
    end
    en = 0; held = r8;
    repeat (5) @(negedge clk);
    checks++; if (r8 != held) begin failures++; $display("register moved with en OFF"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
