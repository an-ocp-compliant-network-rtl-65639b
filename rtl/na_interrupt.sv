// Interrupt (target adapter): carries the slave's SInterrupt pin across the
// network as a virtual wire. Whenever SInterrupt differs from the level last
// reported, an interrupt packet carrying the new level is requested from
// Response Encap (intr_valid, intr_level); intr_taken records the level as
// sent. The destination (output port and BE routing path) is set by a
// configuration packet through the network side (cfg_we, cfg_data =
// {port[17:16], path[15:0]}); until then no interrupt packet is sent.
// Sending both edges, so that the initiator's pin follows the slave's level,
// is this design's choice.
module na_interrupt
  import mango_na_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              SInterrupt,
  input  logic              cfg_we,
  input  logic [31:0]       cfg_data,
  output logic              intr_valid,
  output logic              intr_level,
  output logic [PORT_W-1:0] dest_port,
  output logic [PATH_W-1:0] dest_path,
  input  logic              intr_taken
);
  logic sent_level, configured;

  assign intr_level = SInterrupt;
  assign intr_valid = configured && (SInterrupt != sent_level);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sent_level <= 1'b0;
      configured <= 1'b0;
      dest_port  <= '0;
      dest_path  <= '0;
    end else begin
      if (cfg_we) begin
        configured <= 1'b1;
        dest_port  <= cfg_data[PATH_W +: PORT_W];
        dest_path  <= cfg_data[PATH_W-1:0];
      end
      if (intr_valid && intr_taken) sent_level <= intr_level;
    end
  end
endmodule
