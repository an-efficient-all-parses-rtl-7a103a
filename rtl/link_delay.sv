// link_delay: D clocks of delay (D >= 0) on a W-bit link between two
// neighbouring processors, cleared by reset. Used for the links of the
// systolic array whose delay exceeds the one clock of the sending
// processor's own output register (the black squares on the links).
module link_delay #(
  parameter int W = 1,
  parameter int D = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (D == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] stage [D];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int k = 0; k < D; k++) stage[k] <= '0;
      end else begin
        stage[0] <= d;
        for (int k = 1; k < D; k++) stage[k] <= stage[k-1];
      end
    end
    assign q = stage[D-1];
  end
endmodule
