// End-point buffer and controller of one Swizzle-Switch input row.
//
// Flits enter through a valid/ready port into a DEPTH-entry circular buffer.
// Every flit carries a multi-hot destination mask; the first flit's mask and
// sideband tag hold for the whole packet (in_last marks its final flit).
// The controller follows the switch protocol: with a packet at the head it
// drives the remaining destination mask on the bus with 'req'; in the next
// cycle the grant lines of the row show which outputs it won, and the
// packet's beats are driven with 'valid', the last one with 'rel', which
// frees those outputs. Outputs of a multicast that were not granted are
// requested again and the packet is replayed to them from the buffer, so an
// input never holds one output while waiting for another and multicasts
// cannot deadlock. Buffer entries (and ready) are freed once every destination
// has received the packet.
//
// The request/grant/transmit/release sequence follows the published switch;
// the buffer depth, the valid/ready port, the sideband tag and the partial
// multicast with replay are this design's choices. A packet must not be longer
// than DEPTH flits.
//
// Timing: a flit accepted at the edge ending cycle t is requested in cycle
// t+1 and, if granted, its first beat is driven in cycle t+2, one beat per
// cycle after that as long as the packet's flits are in the buffer.
module ss_input_port
  import ssn_pkg::*;
#(
  parameter int unsigned M     = 64,
  parameter int unsigned W     = 128,
  parameter int unsigned DEPTH = 8,
  parameter int unsigned TAGW  = 1,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // flit input
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [M-1:0]    in_dest,
  input  logic [TAGW-1:0] in_tag,
  input  logic            in_last,
  input  logic [W-1:0]    in_data,
  // switch input row
  output logic [W-1:0]    bus,
  output logic            req,
  output logic            valid,
  output logic            rel,
  output logic [TAGW-1:0] cur_tag,   // tag of the packet at the head
  input  logic [M-1:0]    gnt
);

  typedef struct packed {
    logic [M-1:0]    dest;
    logic [TAGW-1:0] tag;
    logic            last;
    logic [W-1:0]    data;
  } flit_t;

  flit_t               mem [DEPTH];
  logic [AW-1:0]       head, wr;
  logic [AW:0]         count;     // flits held
  logic [AW:0]         rd_off;    // beats of the current pass already sent
  logic [M-1:0]        remaining; // destinations still to serve
  logic                active;    // 'remaining' loaded for the head packet
  port_state_e         state;

  flit_t               cur, hd;
  logic [AW-1:0]       rd;
  logic                beat_avail, send, push, finish, commit;
  logic [M-1:0]        rem_eff, rem_after;

  assign in_ready   = (count < (AW+1)'(DEPTH));
  assign push       = in_valid && in_ready;
  assign rd         = AW'((32'(head) + 32'(rd_off)) % DEPTH);
  assign cur        = mem[rd];
  assign hd         = mem[head];
  assign beat_avail = (rd_off < count);
  assign rem_eff    = active ? remaining : hd.dest;
  assign cur_tag    = hd.tag;

  always_comb begin
    req   = 1'b0;
    valid = 1'b0;
    rel   = 1'b0;
    bus   = '0;
    send  = 1'b0;
    if (state == PS_DATA || |gnt) begin
      // transmitting to the outputs granted in the previous cycle
      if (beat_avail) begin
        send  = 1'b1;
        valid = 1'b1;
        rel   = cur.last;
        bus   = cur.data;
      end
    end else if (count != 0) begin
      req = 1'b1;
      bus = W'(rem_eff);
    end
  end

  assign finish    = send && cur.last;
  assign rem_after = remaining & ~gnt;
  assign commit    = finish && (rem_after == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head      <= '0;
      wr        <= '0;
      count     <= '0;
      rd_off    <= '0;
      remaining <= '0;
      active    <= 1'b0;
      state     <= PS_ARB;
    end else begin
      if (push) begin
        mem[wr] <= '{dest: in_dest, tag: in_tag, last: in_last, data: in_data};
        wr      <= (wr == AW'(DEPTH-1)) ? '0 : AW'(wr + 1'b1);
      end
      if (req) begin
        remaining <= rem_eff;
        active    <= 1'b1;
      end
      if (send) begin
        if (finish) begin
          state     <= PS_ARB;
          rd_off    <= '0;
          remaining <= rem_after;
          if (commit) begin
            active <= 1'b0;
            head   <= AW'((32'(head) + 32'(rd_off) + 1) % DEPTH);
          end
        end else begin
          state  <= PS_DATA;
          rd_off <= rd_off + 1'b1;
        end
      end
      count <= count + (AW+1)'(push) - (commit ? (rd_off + 1'b1) : '0);
    end
  end

  // Grants only answer this port's requests; a packet fits in the buffer.
  a_gnt_subset: assert property (@(posedge clk) disable iff (!rst_n)
                                 (state == PS_ARB && |gnt) |-> ((gnt & ~remaining) == '0));
  a_fits: assert property (@(posedge clk) disable iff (!rst_n)
                           (state == PS_DATA && !beat_avail) |-> (count < (AW+1)'(DEPTH)));

endmodule
