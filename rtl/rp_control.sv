// rp_control: control section of the Raster Processor.
//
// Rasterization mode (C0 = 0).  Every command is four 16-bit words on four
// consecutive clocks; a word counter (restarted by reset and by imaging mode)
// frames them, so the bus must always carry whole commands.  Words 1-3 hold
// a 3-bit field in D15-D13 and a 13-bit value in D12-D0.
//   Raster Fill  (opcode 0): Y | ALU op, Xs | -, Xe | halftone pattern.
//     word 1: Y is mapped to an internal row and a hit flag,
//     word 2: the comparator sees Xs, L1 latches NOT PCLT,
//     word 3: the comparator sees Xe, L2 latches PCLT, the row is read,
//     word 4: the pattern passes the halftone ALU (mode = C1 C2 of this
//             clock) and the scan line ALU result is written back.
//     One fill is one 4-clock memory cycle; the result is in the array after
//     the clock edge ending word 4.
//   Set Address and Interleave (opcode 2, chip select with word 1):
//     LO/HI + Y position | LO/HI + X position | Nx, Ny.  Applied after word 4.
//   Refresh (opcode 3): the refresh counter is incremented and the row it
//     names is read and written back unchanged.
// Coordinate mapping.  The Set Address position is taken as the first screen
// coordinate the chip holds.  High-order interleave: the chip owns Y with the
// bits above the 6 row bits equal to those of its position, internal row =
// low 6 bits.  Low-order interleave: it owns Y with Y mod 2^Ny equal to its
// position mod 2^Ny, internal row = Y >> Ny.  X works the same way but is not
// a yes/no decision: the coordinate is reduced to the virtual-root inputs
// and low bits of the parallel comparator (for high order the tree is simply
// extended by comparing the upper bits; for low order the number of local
// pixels left of X is computed), so a span that only partly covers the chip
// selects exactly the chip's pixels inside it.
//
// Imaging mode (C0 = 1), one command per clock, effective only with chip
// select: {C1,C2} = 00 clear the Y display counter / 01 increment it, then
// fetch that line into the display latches and select the first group (data
// lines off during the next clock); 10 drive the next 16 pixels during the
// next clock; 11 no operation (drive the selected 16 pixels during the next
// clock).  Without chip select the data lines are off in the next clock.
// The array runs back-to-back 4-clock cycles in imaging mode: a pending
// display fetch takes the next one, otherwise it is a refresh cycle.  A fetch
// therefore completes within 8 clocks, which is why each fetch command must
// be followed by 8 no-operation commands.
//
// The command formats, mode-line table, refresh behaviour and 8-cycle fetch
// rule follow the design; bit placement in a word, the start-of-command
// framing, the imaging-mode output timing and the reset state (high-order
// interleave at position 0) are this implementation's choices.
//
// Lint note: the assertions below use the asynchronous reset rst_n in
// disable iff; the linter reports this as a reset used both ways, while no
// flip-flop uses it synchronously.
module rp_control
  import raster_pkg::*;
#(
  parameter int ROWS    = 64,
  parameter int COLS    = 256,
  parameter int COORD_W = 13,
  localparam int ROW_W  = $clog2(ROWS),
  localparam int COL_W  = $clog2(COLS),
  localparam int HTW    = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // chip pins
  input  logic [15:0]      d_in,
  input  logic [2:0]       c,        // c[0] = C0, c[1] = C1, c[2] = C2
  input  logic             cs,
  output logic [15:0]      d_out,
  output logic             d_oe,
  // parallel comparator
  output logic [COL_W-1:0] cmp_b,
  output logic             cmp_root_eq,
  output logic             cmp_root_lt,
  // scan line ALU and halftone ALU
  output logic             load_l1,
  output logic             load_l2,
  output alu_op_e          alu_op,
  output ht_mode_e         ht_mode,
  // memory array
  output logic             rd_en,
  output logic [ROW_W-1:0] rd_row,
  output logic             wr_en,
  output logic [ROW_W-1:0] wr_row,
  // display latches
  output logic             disp_load,
  output logic             sel_clear,
  output logic             sel_next,
  input  logic [HTW-1:0]  cur_group,
  input  logic [HTW-1:0]  next_group
);

  // ---------------------------------------------------------------- config
  logic               y_hi, x_hi;
  logic [COORD_W-1:0] y_pos, x_pos;
  logic [7:0]         nx, ny;

  // ---------------------------------------------------------------- state
  logic [1:0]         wc;            // word of the current command
  rp_opcode_e         cmd_opc;
  logic               cmd_cs;
  logic               cmd_hit;
  logic [ROW_W-1:0]   cmd_row;
  alu_op_e            cmd_alu;
  logic               sa_yhi, sa_xhi;
  logic [COORD_W-1:0] sa_ypos, sa_xpos;
  logic [ROW_W-1:0]   refcnt;

  logic [ROW_W-1:0]   ycnt;          // Y display counter
  logic               fetch_pending;
  logic [1:0]         dphase;
  logic               dfetch;        // current imaging-mode cycle is a fetch
  logic [ROW_W-1:0]   drow;

  logic               disp_mode;
  disp_cmd_e          dcmd;
  rp_opcode_e         w_opc;
  logic [COORD_W-1:0] w_val;

  assign disp_mode = c[0];
  assign dcmd      = disp_cmd_e'({c[1], c[2]});
  assign ht_mode   = ht_mode_e'({c[1], c[2]});
  assign w_opc     = rp_opcode_e'(d_in[15:13]);
  assign w_val     = d_in[COORD_W-1:0];

  // ------------------------------------------------------- coordinate maps
  function automatic int clamp_n(input logic [7:0] n);
    return (int'(n) > COORD_W) ? COORD_W : int'(n);
  endfunction

  // Y: does this chip hold scan line y, and in which row
  function automatic logic [ROW_W:0] map_y(input logic [COORD_W-1:0] y);
    int n, yy, pp, r;
    logic hit;
    yy = int'(y);
    pp = int'(y_pos);
    if (y_hi) begin
      hit = (yy >> ROW_W) == (pp >> ROW_W);
      r   = yy % ROWS;
    end else begin
      n   = clamp_n(ny);
      r   = yy >> n;
      hit = ((yy % (1 << n)) == (pp % (1 << n))) && (r < ROWS);
    end
    return {hit, ROW_W'(r)};
  endfunction

  // X: virtual root {eq, lt} and low bits B of the comparator, such that
  // PCLT(j) = (screen x of local pixel j) < x
  function automatic logic [COL_W+1:0] map_x(input logic [COORD_W-1:0] x);
    int n, xx, pp, bound;
    logic eq, lt;
    logic [COL_W-1:0] bb;
    xx = int'(x);
    pp = int'(x_pos);
    if (x_hi) begin
      eq = (xx >> COL_W) == (pp >> COL_W);
      lt = (xx >> COL_W) >  (pp >> COL_W);
      bb = COL_W'(xx % COLS);
    end else begin
      n  = clamp_n(nx);
      pp = pp % (1 << n);
      bound = (xx <= pp) ? 0 : (((xx - pp - 1) >> n) + 1);
      lt = bound >= COLS;
      eq = !lt;
      bb = COL_W'(bound % COLS);
    end
    return {eq, lt, bb};
  endfunction

  logic [ROW_W:0]   ymap;
  logic [COL_W+1:0] xmap;
  assign ymap = map_y(w_val);
  assign xmap = map_x(w_val);
  assign {cmp_root_eq, cmp_root_lt, cmp_b} = xmap;

  // ------------------------------------------------------- datapath strobes
  always_comb begin
    load_l1   = 1'b0;
    load_l2   = 1'b0;
    alu_op    = ALU_NOP;
    rd_en     = 1'b0;
    rd_row    = cmd_row;
    wr_en     = 1'b0;
    wr_row    = cmd_row;
    disp_load = 1'b0;
    sel_clear = 1'b0;
    sel_next  = 1'b0;
    if (!disp_mode) begin
      unique case (wc)
        2'd1: load_l1 = (cmd_opc == OPC_FILL);
        2'd2: begin
          load_l2 = (cmd_opc == OPC_FILL);
          rd_en   = ((cmd_opc == OPC_FILL) && cmd_hit) || (cmd_opc == OPC_REFRESH);
        end
        2'd3: begin
          wr_en  = ((cmd_opc == OPC_FILL) && cmd_hit) || (cmd_opc == OPC_REFRESH);
          alu_op = (cmd_opc == OPC_FILL) ? cmd_alu : ALU_NOP;
        end
        default: ;
      endcase
    end else begin
      rd_row = drow;
      wr_row = drow;
      if (dphase == 2'd2) rd_en = 1'b1;
      if (dphase == 2'd3) begin
        disp_load = dfetch;
        wr_en     = !dfetch;          // refresh: write back unchanged (ALU no-op)
      end
      if (cs) begin
        sel_clear = (dcmd == DISP_CLEAR_Y) || (dcmd == DISP_INCR_Y);
        sel_next  = (dcmd == DISP_NEXT);
      end
    end
  end

  // ------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_hi <= 1'b1;  x_hi <= 1'b1;
      y_pos <= '0;   x_pos <= '0;
      nx <= '0;      ny <= '0;
      wc <= '0;
      cmd_opc <= OPC_REFRESH;
      cmd_cs <= 1'b0;
      cmd_hit <= 1'b0;
      cmd_row <= '0;
      cmd_alu <= ALU_NOP;
      sa_yhi <= 1'b1; sa_xhi <= 1'b1;
      sa_ypos <= '0;  sa_xpos <= '0;
      refcnt <= '0;
      ycnt <= '0;
      fetch_pending <= 1'b0;
      dphase <= '0;
      dfetch <= 1'b0;
      drow <= '0;
      d_out <= '0;
      d_oe <= 1'b0;
    end else if (!disp_mode) begin
      // ---------------- rasterization mode
      wc     <= wc + 2'd1;
      dphase <= '0;
      d_oe   <= 1'b0;
      unique case (wc)
        2'd0: begin
          cmd_opc <= w_opc;
          cmd_cs  <= cs;
          cmd_hit <= ymap[ROW_W];
          cmd_row <= ymap[ROW_W-1:0];
          if (w_opc == OPC_REFRESH) begin
            refcnt  <= refcnt + 1'b1;
            cmd_row <= refcnt + 1'b1;
          end
        end
        2'd1: begin
          cmd_alu <= alu_op_e'(d_in[14:13]);
          sa_yhi  <= d_in[13];
          sa_ypos <= w_val;
        end
        2'd2: begin
          sa_xhi  <= d_in[13];
          sa_xpos <= w_val;
        end
        2'd3: begin
          if (cmd_opc == OPC_SETADDR && cmd_cs) begin
            y_hi <= sa_yhi;  y_pos <= sa_ypos;
            x_hi <= sa_xhi;  x_pos <= sa_xpos;
            nx   <= d_in[15:8];
            ny   <= d_in[7:0];
          end
        end
        default: ;
      endcase
    end else begin
      // ---------------- imaging mode
      wc     <= '0;
      dphase <= dphase + 2'd1;
      if (dphase == 2'd0) begin
        if (fetch_pending) begin
          dfetch        <= 1'b1;
          drow          <= ycnt;
          fetch_pending <= 1'b0;
        end else begin
          dfetch <= 1'b0;
          refcnt <= refcnt + 1'b1;
          drow   <= refcnt + 1'b1;
        end
      end
      if (cs) begin
        unique case (dcmd)
          DISP_CLEAR_Y: begin
            ycnt <= '0;
            fetch_pending <= 1'b1;
            d_oe <= 1'b0;
          end
          DISP_INCR_Y: begin
            ycnt <= ycnt + 1'b1;
            fetch_pending <= 1'b1;
            d_oe <= 1'b0;
          end
          DISP_NEXT: begin
            d_out <= next_group;
            d_oe  <= 1'b1;
          end
          DISP_NOP: begin
            d_out <= cur_group;
            d_oe  <= 1'b1;
          end
          default: ;
        endcase
      end else begin
        d_oe <= 1'b0;
      end
    end
  end

  // The mode may only change between commands.
  a_mode_at_boundary: assert property (@(posedge clk) disable iff (!rst_n)
    disp_mode |-> wc == 2'd0)
    else $error("imaging mode entered in the middle of a four-word command");

endmodule
