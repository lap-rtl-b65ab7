// lap_spu: Stream Prefetch Unit (SPU) of one LAP context.
//
// Prefetches the context's input characters from a valid/ready stream into a
// small FIFO and releases them one at a time: the character at the FIFO head
// is only replaced when the pipeline consumes it. The consumed character
// becomes the context's current character, kept with its position in the
// stream and a flag telling whether it was the last one. Releasing one
// character per consumption follows the LAP description; the FIFO depth, the
// stream handshake with its "last" marker and the position counter are this
// design's own.
//
// Interface and timing:
//   in_valid/in_ready/in_char/in_last  stream input, transfer when both high
//   head_valid/head_char/head_last     FIFO head, combinational
//   consume                            moves the head into the current
//                                      character at the clock edge
//   cur_char/cur_pos/cur_last          the consumed (current) character;
//                                      cur_pos is 0 for the first character
//   init                               empties the FIFO and clears position
module lap_spu
  import lap_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [CHAR_W-1:0] in_char,
  input  logic              in_last,
  output logic              head_valid,
  output logic [CHAR_W-1:0] head_char,
  output logic              head_last,
  input  logic              consume,
  output logic [CHAR_W-1:0] cur_char,
  output logic [POS_W-1:0]  cur_pos,
  output logic              cur_last,
  output logic              cur_valid
);

  typedef struct packed {
    logic [CHAR_W-1:0] ch;
    logic              last;
  } entry_t;

  entry_t      fifo [DEPTH];
  logic [AW-1:0] rd, wr;
  logic [AW:0]   count;
  logic          push, pop;

  assign in_ready   = (32'(count) < DEPTH) && !init;
  assign head_valid = (count != '0);
  assign head_char  = fifo[rd].ch;
  assign head_last  = fifo[rd].last;
  assign push       = in_valid && in_ready;
  assign pop        = consume && head_valid;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) fifo[wr] <= '{ch: in_char, last: in_last};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; wr <= '0; count <= '0;
      cur_char <= '0; cur_pos <= '0; cur_last <= 1'b0; cur_valid <= 1'b0;
    end else if (init) begin
      rd <= '0; wr <= '0; count <= '0;
      cur_char <= '0; cur_pos <= '0; cur_last <= 1'b0; cur_valid <= 1'b0;
    end else begin
      if (push) wr <= incr(wr);
      if (pop) begin
        rd        <= incr(rd);
        cur_char  <= head_char;
        cur_last  <= head_last;
        cur_pos   <= cur_valid ? cur_pos + 1'b1 : '0;
        cur_valid <= 1'b1;
      end
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  a_consume_needs_data: assert property (@(posedge clk) disable iff (!rst_n)
    consume |-> head_valid);

endmodule
