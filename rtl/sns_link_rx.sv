// sns_link_rx: double-buffered input latch of a pipeline stage.
//
// Collects CH_W-bit flits from the crossbar, most significant flit first,
// into an assembly register; flit_last completes the message, whose unsent
// trailing bits read as zero. Completed messages wait in a two-entry
// buffer (double buffering, as the document gives for every stage input)
// until the stage takes them with msg_valid && msg_ready. Flits are
// refused (flit_ready low) while both entries are full, so no message is
// ever dropped: back pressure propagates through the switch.
module sns_link_rx #(
  parameter int MSG_W = 64,
  parameter int CH_W  = 64,
  parameter int NF    = (MSG_W + CH_W - 1) / CH_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flit_valid,
  output logic              flit_ready,
  input  logic [CH_W-1:0]   flit_data,
  input  logic              flit_last,
  output logic              msg_valid,
  input  logic              msg_ready,
  output logic [MSG_W-1:0]  msg
);
  localparam int PW   = NF * CH_W;
  localparam int IW   = (NF > 1) ? $clog2(NF) : 1;

  logic [PW-1:0]        asm_q;
  logic [IW-1:0]        idx_q;
  logic [1:0][MSG_W-1:0] buf_q;
  logic                 rd_ptr, wr_ptr;
  logic [1:0]           count;
  logic                 take, done, pop;
  logic [PW-1:0]        asm_next;

  assign flit_ready = (count != 2'd2);
  assign take       = flit_valid && flit_ready;
  assign done       = take && flit_last;
  assign msg_valid  = (count != 2'd0);
  assign msg        = buf_q[rd_ptr];
  assign pop        = msg_valid && msg_ready;

  always_comb begin
    asm_next = asm_q;
    asm_next[PW-1 - int'(idx_q)*CH_W -: CH_W] = flit_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      asm_q  <= '0;
      idx_q  <= '0;
      buf_q  <= '0;
      rd_ptr <= 1'b0;
      wr_ptr <= 1'b0;
      count  <= '0;
    end else begin
      if (take) begin
        if (flit_last) begin
          buf_q[wr_ptr] <= asm_next[PW-1 -: MSG_W];
          wr_ptr        <= ~wr_ptr;
          asm_q         <= '0;
          idx_q         <= '0;
        end else begin
          asm_q <= asm_next;
          idx_q <= idx_q + 1'b1;
        end
      end
      if (pop) rd_ptr <= ~rd_ptr;
      count <= count + 2'(done) - 2'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   take && !flit_last |-> int'(idx_q) < NF - 1);
endmodule
