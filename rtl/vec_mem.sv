// vec_mem: storage for one half of a weight vector or of a delay line.
//
// A DEPTH x W memory with one write port and one read port. The read is
// registered: data for the address presented in cycle t is on rdata in cycle
// t+1, so the stage controller has one schedule whichever storage is used.
// USE_BRAM selects how the array is meant to be mapped: 0 keeps it in
// flip-flops (the "array" method, fast but costly in slice registers), 1 asks
// for block RAM. The two behave identically cycle by cycle; only the
// implementation hint differs. There is no reset: the stage controller clears
// the contents by writing zeros to every address.
module vec_mem #(
  parameter int unsigned DEPTH    = 25,
  parameter int unsigned W        = 24,
  parameter bit          USE_BRAM = 1'b0,
  localparam int unsigned AW      = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                clk,
  input  logic                we,
  input  logic [AW-1:0]       waddr,
  input  logic signed [W-1:0] wdata,
  input  logic [AW-1:0]       raddr,
  output logic signed [W-1:0] rdata
);

  if (USE_BRAM) begin : g_bram
    (* ram_style = "block" *) logic signed [W-1:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (we) mem[waddr] <= wdata;
      rdata <= mem[raddr];
    end
  end else begin : g_regs
    (* ram_style = "registers" *) logic signed [W-1:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (we) mem[waddr] <= wdata;
      rdata <= mem[raddr];
    end
  end

endmodule
