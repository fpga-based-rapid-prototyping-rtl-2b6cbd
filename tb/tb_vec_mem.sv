// tb_vec_mem: self-checking test of the vector memory in both storage styles.
//
// Random words are written to every address of a flip-flop instance and a
// block-RAM instance and read back in random order, checking the one-cycle
// read latency and that a write does not disturb other addresses.
`timescale 1ns/1ps
module tb_vec_mem;

  localparam int unsigned DEPTH = 25;
  localparam int unsigned W     = 24;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 1'b0;
  logic we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic signed [W-1:0] wdata = '0;
  logic signed [W-1:0] rd_ff, rd_bram;

  int checks = 0;
  int failures = 0;
  logic signed [W-1:0] model [DEPTH];

  always #5 clk = ~clk;

  vec_mem #(.DEPTH(DEPTH), .W(W), .USE_BRAM(1'b0)) u_ff (
    .clk, .we, .waddr, .wdata, .raddr, .rdata(rd_ff));
  vec_mem #(.DEPTH(DEPTH), .W(W), .USE_BRAM(1'b1)) u_bram (
    .clk, .we, .waddr, .wdata, .raddr, .rdata(rd_bram));

  task automatic wr(input int a, input logic signed [W-1:0] d);
    @(negedge clk);
    we = 1'b1;
    waddr = AW'(a);
    wdata = d;
    model[a] = d;
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic rd(input int a);
    @(negedge clk);
    raddr = AW'(a);
    @(negedge clk);
    raddr = AW'((a + 1) % DEPTH);  // changing the address must not change held data
    checks++;
    if (rd_ff != model[a] || rd_bram != model[a]) begin
      failures++;
      if (failures < 10) $display("FAIL addr %0d: %0d %0d expected %0d", a, rd_ff, rd_bram, model[a]);
    end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) wr(a, W'($urandom));
    for (int k = 0; k < 200; k++) rd($urandom_range(0, DEPTH - 1));
    for (int k = 0; k < 100; k++) begin
      wr($urandom_range(0, DEPTH - 1), W'($urandom));
      rd($urandom_range(0, DEPTH - 1));
    end
    for (int a = 0; a < DEPTH; a++) rd(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
