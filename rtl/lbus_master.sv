// PCI-card side of the L-bus, the 12-bit control bus from the PCI card's
// gate array to the digital front end (DFE).
//
// The hardware description gives only the bus name, its 12-bit width and its
// purpose (control of the DFE); the protocol here is this design's own. A
// write is two 12-bit words on `lb_data`: first the register address
// (`lb_addr` high), then the data (`lb_addr` low). Each word is a four-phase
// handshake: the master drives the word and raises `lb_stb`; the DFE latches
// the word and raises `lb_ack`; the master drops `lb_stb`; the DFE drops
// `lb_ack`. Because the handshake is fully interlocked, the two cards may run
// on unrelated clocks: `lb_ack` is synchronised here by two flip-flops, and
// the word is held stable for as long as `lb_stb` is high.
//
// Host side: `req` with `req_addr`/`req_data` is taken when `ready` is high
// (valid/ready). A write takes about eight clocks of each side plus the
// synchroniser delays.
module lbus_master
  import bpm_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              req,
  input  logic [LBUS_W-1:0] req_addr,
  input  logic [LBUS_W-1:0] req_data,
  output logic              ready,
  output logic [LBUS_W-1:0] lb_data,
  output logic              lb_addr,
  output logic              lb_stb,
  input  logic              lb_ack
);

  typedef enum logic [2:0] {M_IDLE, M_ADDR_STB, M_ADDR_REL, M_DATA_STB, M_DATA_REL} mstate_e;

  mstate_e           state;
  logic [1:0]        ack_sync;
  logic              ack;
  logic [LBUS_W-1:0] data_hold;

  assign ack = ack_sync[1];

  always_ff @(posedge clk) begin
    if (rst) ack_sync <= '0;
    else     ack_sync <= {ack_sync[0], lb_ack};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= M_IDLE;
      lb_data   <= '0;
      lb_addr   <= 1'b0;
      lb_stb    <= 1'b0;
      data_hold <= '0;
    end else begin
      unique case (state)
        M_IDLE: if (req) begin
          lb_data   <= req_addr;
          lb_addr   <= 1'b1;
          lb_stb    <= 1'b1;
          data_hold <= req_data;
          state     <= M_ADDR_STB;
        end
        M_ADDR_STB: if (ack) begin
          lb_stb <= 1'b0;
          state  <= M_ADDR_REL;
        end
        M_ADDR_REL: if (!ack) begin
          lb_data <= data_hold;
          lb_addr <= 1'b0;
          lb_stb  <= 1'b1;
          state   <= M_DATA_STB;
        end
        M_DATA_STB: if (ack) begin
          lb_stb <= 1'b0;
          state  <= M_DATA_REL;
        end
        default: if (!ack) state <= M_IDLE;  // M_DATA_REL
      endcase
    end
  end

  assign ready = (state == M_IDLE);

  // The word may change only while the strobe is low.
  a_stable: assert property (@(posedge clk) disable iff (rst)
                             lb_stb && $past(lb_stb) |-> $stable(lb_data) && $stable(lb_addr));

endmodule
