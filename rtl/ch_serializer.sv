// Parallel-to-serial converter: an NCH:1 multiplexer clocked at NCH times
// the channel bit rate.
//
// A modulo-NCH slot counter advances on every fast clock edge and selects
// one channel bit onto ser_out, so each frame of NCH fast cycles carries one
// bit of every channel, channel 0 first. slot gives the channel currently on
// the line and frame_end marks the last slot, which the receiving side uses
// to deserialise. The channel bits must be held for a whole frame; frame_end
// is the natural enable for the logic that produces them.
//
// The 8:1 multiplexer running at 8x the data rate follows the design
// description; the slot counter, the channel order and frame_end are this
// design's choices. ser_out is combinational from the slot counter and the
// inputs, as in a plain multiplexer.
module ch_serializer #(
  parameter int unsigned NCH = 8
) (
  input  logic                   clk,       // NCH x channel bit rate
  input  logic                   rst_n,
  input  logic [NCH-1:0]         din,
  output logic                   ser_out,
  output logic [$clog2(NCH)-1:0] slot,
  output logic                   frame_end
);

  localparam int unsigned SW = $clog2(NCH);

  always_ff @(posedge clk) begin
    if (!rst_n)                        slot <= '0;
    else if (slot == SW'(NCH - 1))     slot <= '0;
    else                               slot <= slot + 1'b1;
  end

  assign ser_out   = din[slot];
  assign frame_end = (slot == SW'(NCH - 1));

endmodule
