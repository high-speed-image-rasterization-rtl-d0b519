// slp_command_decoder: interprets the Scan Line Processor's host word stream.
//
// A command is a header word (opcode in bits 15-12) followed by its argument
// words; host_valid/host_ready move one word per clock.
//   RAW        + 4 words   passed to the Raster Processors unchanged
//   SET_MODE               ALU op = bits 1-0, halftone mode C1C2 = bits 3-2
//   HT_LOAD    + pattern   halftone memory row = bits 3-0
//   POLY_START + X + Y     start vertex of a polygon
//   VERTEX     + X + Y     bit 0: right side (else left); bit 1: end vertex
//   FONT_DEF   + size + chunks   size word: width 15-8, height 7-0; then
//                          height rows of ceil(width/16) chunk words
//   CHAR       + X + Y     place the stored character
// Vertices come in descending Y.  A left (right) vertex closes the edge from
// the previous left (right) vertex, or from the start vertex, to itself and
// queues it for the polygon processor; the end vertex closes both sides.
// Memory loads and mode changes wait until the polygon and font processors
// are idle.  The whole command format is this design's own; the original design
// specifies only what the decoder must do (dispatch commands, fill the
// halftone and font memories).
//
// Lint note: header bits 11-4 are unused by every command and are ignored,
// which leaves room for more commands.
module slp_command_decoder
  import raster_pkg::*;
#(
  parameter int FONT_ROWS   = 64,
  parameter int FONT_CHUNKS = 4,
  localparam int CW   = RP_COORD_W,
  localparam int FR_W = $clog2(FONT_ROWS),
  localparam int FC_W = (FONT_CHUNKS > 1) ? $clog2(FONT_CHUNKS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            host_valid,
  output logic            host_ready,
  input  logic [15:0]     host_word,
  // status of the processors
  input  logic            poly_idle,
  input  logic            font_idle,
  // mode
  output alu_op_e         alu_op,
  output ht_mode_e        ht_mode,
  // raw Raster Processor command
  output logic            raw_valid,
  input  logic            raw_ready,
  output logic [15:0]     raw_words [4],
  // halftone memory
  output logic            ht_wr_en,
  output logic [3:0]      ht_wr_row,
  output logic [15:0]     ht_wr_data,
  // font memory and character size
  output logic            font_wr_en,
  output logic [FR_W-1:0] font_wr_row,
  output logic [FC_W-1:0] font_wr_chunk,
  output logic [15:0]     font_wr_data,
  output logic [7:0]      font_width,
  output logic [7:0]      font_height,
  // edges
  output logic            l_valid,
  input  logic            l_ready,
  output edge_t           l_edge,
  output logic            r_valid,
  input  logic            r_ready,
  output edge_t           r_edge,
  // character placement
  output logic            place_valid,
  input  logic            place_ready,
  output logic [CW-1:0]   place_x,
  output logic [CW-1:0]   place_y
);

  typedef enum logic [2:0] {S_HDR, S_ARGS, S_EXEC, S_END_R, S_FONT} state_e;

  state_e        state;
  slp_opcode_e   opc;
  logic [11:0]   hdr;
  logic [15:0]   args [4];
  logic [2:0]    nargs, argi;
  logic [CW-1:0] last_lx, last_ly, last_rx, last_ry;
  logic [7:0]    frow, fchunk, nchunks;

  function automatic logic [2:0] arg_count(input slp_opcode_e o);
    case (o)
      SLP_RAW:        return 3'd4;
      SLP_HT_LOAD:    return 3'd1;
      SLP_POLY_START: return 3'd2;
      SLP_VERTEX:     return 3'd2;
      SLP_FONT_DEF:   return 3'd1;
      SLP_CHAR:       return 3'd2;
      default:        return 3'd0;
    endcase
  endfunction

  logic [CW-1:0] vx, vy;
  assign vx = args[0][CW-1:0];
  assign vy = args[1][CW-1:0];

  assign host_ready = (state == S_HDR) || (state == S_ARGS) || (state == S_FONT);
  assign raw_words  = args;
  assign raw_valid  = (state == S_EXEC) && (opc == SLP_RAW);
  assign place_valid = (state == S_EXEC) && (opc == SLP_CHAR);
  assign place_x    = vx;
  assign place_y    = vy;
  assign l_edge     = '{x0: last_lx, y0: last_ly, x1: vx, y1: vy};
  assign r_edge     = '{x0: last_rx, y0: last_ry, x1: vx, y1: vy};
  assign l_valid    = (state == S_EXEC) && (opc == SLP_VERTEX) && !hdr[0];
  assign r_valid    = ((state == S_EXEC) && (opc == SLP_VERTEX) && hdr[0] && !hdr[1]) || (state == S_END_R);

  assign ht_wr_en      = (state == S_EXEC) && (opc == SLP_HT_LOAD) && poly_idle;
  assign ht_wr_row     = hdr[3:0];
  assign ht_wr_data    = args[0];
  assign font_wr_en    = (state == S_FONT) && host_valid;
  assign font_wr_row   = FR_W'(frow);
  assign font_wr_chunk = FC_W'(fchunk);
  assign font_wr_data  = host_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_HDR;
      opc <= SLP_SET_MODE;
      hdr <= '0;
      for (int i = 0; i < 4; i++) args[i] <= '0;
      nargs <= '0; argi <= '0;
      alu_op <= ALU_OR;
      ht_mode <= HT_ASIS;
      last_lx <= '0; last_ly <= '0; last_rx <= '0; last_ry <= '0;
      frow <= '0; fchunk <= '0; nchunks <= '0;
      font_width <= '0; font_height <= '0;
    end else begin
      unique case (state)
        S_HDR: if (host_valid) begin
          opc   <= slp_opcode_e'(host_word[15:12]);
          hdr   <= host_word[11:0];
          nargs <= arg_count(slp_opcode_e'(host_word[15:12]));
          argi  <= '0;
          state <= (arg_count(slp_opcode_e'(host_word[15:12])) == 0) ? S_EXEC : S_ARGS;
        end
        S_ARGS: if (host_valid) begin
          args[argi[1:0]] <= host_word;
          argi <= argi + 3'd1;
          if (argi + 3'd1 == nargs) state <= S_EXEC;
        end
        S_EXEC: begin
          unique case (opc)
            SLP_RAW:  if (raw_ready) state <= S_HDR;
            SLP_SET_MODE: if (poly_idle && font_idle) begin
              alu_op  <= alu_op_e'(hdr[1:0]);
              ht_mode <= ht_mode_e'(hdr[3:2]);
              state   <= S_HDR;
            end
            SLP_HT_LOAD: if (poly_idle) state <= S_HDR;
            SLP_POLY_START: begin
              last_lx <= vx; last_ly <= vy;
              last_rx <= vx; last_ry <= vy;
              state <= S_HDR;
            end
            SLP_VERTEX: begin
              if (hdr[0] && !hdr[1]) begin
                if (r_ready) begin
                  last_rx <= vx; last_ry <= vy;
                  state <= S_HDR;
                end
              end else if (l_ready) begin
                last_lx <= vx; last_ly <= vy;
                state <= hdr[1] ? S_END_R : S_HDR;
              end
            end
            SLP_FONT_DEF: if (font_idle) begin
              font_width  <= args[0][15:8];
              font_height <= args[0][7:0];
              nchunks     <= (args[0][15:8] + 8'd15) >> 4;
              frow <= '0; fchunk <= '0;
              state <= (args[0][15:8] == 0 || args[0][7:0] == 0) ? S_HDR : S_FONT;
            end
            SLP_CHAR: if (place_ready) state <= S_HDR;
            default: state <= S_HDR;
          endcase
        end
        S_END_R: if (r_ready) begin
          last_rx <= vx; last_ry <= vy;
          state <= S_HDR;
        end
        S_FONT: if (host_valid) begin
          if (fchunk + 8'd1 == nchunks) begin
            fchunk <= '0;
            frow <= frow + 8'd1;
            if (frow + 8'd1 == font_height) state <= S_HDR;
          end else begin
            fchunk <= fchunk + 8'd1;
          end
        end
        default: state <= S_HDR;
      endcase
    end
  end

endmodule
