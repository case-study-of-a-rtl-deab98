// delay_line: a chain of DEPTH registers that delays a WIDTH-bit bus by DEPTH clock cycles.
// Used to keep the angle, the sample strobe and side-band values aligned with the
// pipelined datapath. DEPTH = 0 is a plain wire. The registers are cleared by the active-low
// synchronous reset so that a delayed strobe never fires spuriously after reset.
module delay_line #(
  parameter int WIDTH = 1,
  parameter int DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] pipe [DEPTH];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) pipe[i] <= '0;
      end else begin
        pipe[0] <= d;
        for (int i = 1; i < DEPTH; i++) pipe[i] <= pipe[i-1];
      end
    end
    assign q = pipe[DEPTH-1];
  end
endmodule
