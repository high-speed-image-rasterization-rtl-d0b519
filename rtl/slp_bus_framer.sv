// slp_bus_framer: drives the Raster Processor bus of one Scan Line Processor.
//
// The bus always carries whole four-word commands, one word per clock with
// C0 = 0.  A one-command slot takes a raw command (priority) or a fill; at
// the start of each four-clock frame the slot's command is sent, or a
// Refresh command when the slot is empty (the original design asks for Refresh as
// filler whenever no operation is ready).  A fill is sent as
// {0,Y} {0,op,Xs} {0,Xe} {pattern} with the ALU op and the halftone mode
// C1 C2 that were in force when the fill entered the slot.  When hold is
// high at a frame boundary the framer stops (held = 1, mode lines C0 C1 C2 =
// 111, the imaging no-operation) so that the Raster Processors can be
// switched to imaging mode; it restarts at a fresh frame when hold drops.
module slp_bus_framer
  import raster_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        fill_valid,
  output logic        fill_ready,
  input  rp_fill_t    fill,
  input  logic        raw_valid,
  output logic        raw_ready,
  input  logic [15:0] raw_words [4],
  input  alu_op_e     alu_op,
  input  ht_mode_e    ht_mode,
  input  logic        hold,
  output logic        held,
  output logic [15:0] rp_d,
  output logic [2:0]  rp_c
);

  logic        slot_valid;
  logic [15:0] slot_words [4];
  ht_mode_e    slot_mode;
  logic [15:0] cur_words [4];
  ht_mode_e    cur_mode;
  logic [1:0]  ph;
  logic        active;
  logic        frame_end;

  assign raw_ready  = !slot_valid;
  assign fill_ready = !slot_valid && !raw_valid;
  assign frame_end  = !active || (ph == 2'd3);
  assign held       = !active;
  assign rp_d       = active ? cur_words[ph] : 16'h0000;
  assign rp_c       = active ? {cur_mode[0], cur_mode[1], 1'b0} : 3'b111;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_valid <= 1'b0;
      for (int i = 0; i < 4; i++) begin
        slot_words[i] <= '0;
        cur_words[i]  <= '0;
      end
      slot_mode <= HT_ASIS;
      cur_mode  <= HT_ASIS;
      ph        <= '0;
      active    <= 1'b0;
    end else begin
      // next frame
      if (frame_end) begin
        ph <= '0;
        if (hold) begin
          active <= 1'b0;
        end else begin
          active <= 1'b1;
          if (slot_valid) begin
            cur_words  <= slot_words;
            cur_mode   <= slot_mode;
            slot_valid <= 1'b0;
          end else begin
            cur_words[0] <= rp_word(OPC_REFRESH, '0);
            cur_words[1] <= '0;
            cur_words[2] <= '0;
            cur_words[3] <= '0;
            cur_mode     <= HT_ASIS;
          end
        end
      end else begin
        ph <= ph + 2'd1;
      end
      // slot fill (the slot is free again from the clock after it was sent)
      if (raw_valid && raw_ready) begin
        slot_valid <= 1'b1;
        slot_words <= raw_words;
        slot_mode  <= ht_mode;
      end else if (fill_valid && fill_ready) begin
        slot_valid    <= 1'b1;
        slot_words[0] <= rp_word(OPC_FILL, fill.y);
        slot_words[1] <= rp_word({1'b0, alu_op}, fill.xs);
        slot_words[2] <= rp_word(3'd0, fill.xe);
        slot_words[3] <= fill.pattern;
        slot_mode     <= ht_mode;
      end
    end
  end

endmodule
