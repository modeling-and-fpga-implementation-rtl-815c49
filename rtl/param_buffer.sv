// param_buffer -- double buffer for the run-time parameters of one unit.
//
// Every read unit and write unit of a node holds one. Parameter words arrive one
// after another on the control bus and are shifted into a shift register
// ('shift' strobe; the newest word enters at the bottom, older words move up,
// so after NUM words the first word sent sits at the top). The shift register
// may be written at any time, even while the network is running. The
// parameters actually used, the register file P1..Pn, change only on the
// 'update' strobe, which copies all words in parallel; the network controller
// issues it only between two runs, so a run always sees one consistent set.
//
// After sending Height then Width: p[0] = P1 = Height, p[1] = P2 = Width.
// Every unit stores all parameters, whether it uses them or not. The register
// file and the shift register reset to zero; a run must not be started before
// an update. Timing: 'p' changes the cycle after 'update'. A 'shift' in the
// same cycle as 'update' reaches the register file only at the next update.
module param_buffer #(
  parameter int unsigned PW  = 16,
  parameter int unsigned NUM = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          shift,
  input  logic [PW-1:0] data,
  input  logic          update,
  output logic [PW-1:0] p [NUM]
);
  logic [PW-1:0] sreg [NUM];   // sreg[0] is the top (oldest word)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NUM; k++) begin
        sreg[k] <= '0;
        p[k]    <= '0;
      end
    end else begin
      if (shift) begin
        for (int k = 0; k < NUM - 1; k++) sreg[k] <= sreg[k+1];
        sreg[NUM-1] <= data;
      end
      if (update) begin
        for (int k = 0; k < NUM; k++) p[k] <= sreg[k];
      end
    end
  end

endmodule
