// tb_sample_regfile: fills the 82-entry register file with random samples,
// reads every entry back against a testbench copy, and checks that a write
// does not disturb other entries and that reads see the old value until the
// write edge.
//
// Depth and width follow the description (82 samples of 4-bit I/Q); the
// read-before-write behaviour checked is this design's own.
module tb_sample_regfile;
  localparam int DATA_W = 4, DEPTH = 82, ADDR_W = 7;
  logic clk = 0, we = 0;
  logic [ADDR_W-1:0] waddr = '0, raddr = '0;
  logic signed [DATA_W-1:0] wre = '0, wim = '0, rre, rim;
  logic [2*DATA_W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  sample_regfile #(.DATA_W(DATA_W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic readall();
    for (int a = 0; a < DEPTH; a++) begin
      raddr = ADDR_W'(a);
      #1;
      checks++;
      if ({rre, rim} !== model[a]) begin
        failures++;
        $display("FAIL addr %0d: got %h exp %h", a, {rre, rim}, model[a]);
      end
    end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = ADDR_W'(a);
      model[a] = 8'($urandom);
      {wre, wim} = model[a];
    end
    @(negedge clk); we = 0;
    readall();
    for (int i = 0; i < 300; i++) begin
      int a;
      logic [2*DATA_W-1:0] v;
      a = $urandom_range(0, DEPTH - 1);
      v = 8'($urandom);
      @(negedge clk);
      we = 1; waddr = ADDR_W'(a); {wre, wim} = v; raddr = ADDR_W'(a);
      #1;
      checks++;                           // old value until the edge
      if ({rre, rim} !== model[a]) begin failures++; $display("FAIL pre-write read"); end
      @(posedge clk); #1;
      model[a] = v;
      checks++;
      if ({rre, rim} !== v) begin failures++; $display("FAIL post-write read"); end
      we = 0;
    end
    readall();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
