// DFE side of the L-bus (see lbus_master for the protocol, which is this
// design's own; the hardware description gives the name and the 12-bit
// width).
//
// The strobe is synchronised into the DFE clock by two flip-flops. On the
// rising edge of the synchronised strobe the word on `lb_data` is taken: an
// address word is stored, a data word produces a one-clock write strobe
// `wr_en` with the stored address on `wr_addr`. `lb_ack` follows the
// synchronised strobe, which completes the four-phase handshake.
//
// Timing: `wr_en` comes three DFE clocks after the data-word strobe rises.
module lbus_slave
  import bpm_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [LBUS_W-1:0] lb_data,
  input  logic              lb_addr,
  input  logic              lb_stb,
  output logic              lb_ack,
  output logic              wr_en,
  output logic [LBUS_W-1:0] wr_addr,
  output logic [LBUS_W-1:0] wr_data
);

  logic [2:0] stb_sync;   // two synchroniser stages plus edge detect
  logic       stb_rise;

  assign stb_rise = stb_sync[1] && !stb_sync[2];

  always_ff @(posedge clk) begin
    if (rst) begin
      stb_sync <= '0;
      lb_ack   <= 1'b0;
      wr_en    <= 1'b0;
      wr_addr  <= '0;
      wr_data  <= '0;
    end else begin
      stb_sync <= {stb_sync[1:0], lb_stb};
      lb_ack   <= stb_sync[1];
      wr_en    <= 1'b0;
      if (stb_rise) begin
        if (lb_addr) wr_addr <= lb_data;
        else begin
          wr_data <= lb_data;
          wr_en   <= 1'b1;
        end
      end
    end
  end

endmodule
