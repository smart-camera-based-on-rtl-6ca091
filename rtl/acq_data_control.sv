// acq_data_control: the acquisition sequencer (data control) that drives a
// random-access CMOS sensor according to the acquisition command.
//
// For each exposure it first holds sen_expose high for cmd.t_int cycles
// (integration), then reads the window pixel by pixel with sen_rd and a
// (sen_row, sen_col) address: cmd.h rows and cmd.w columns starting at the
// window origin, keeping one row in sub_y+1 and one column in sub_x+1
// (subsampling in Y and X). The sensor answers each read one cycle later on
// sen_pix/sen_pix_valid; pixels are passed on as pix/pix_valid in read order.
// Modes (acq_mode_e):
//   ACQ_WINDOW    one exposure of the window;
//   ACQ_MULTI     cmd.n_exp exposures of the same window, cmd.t_delay idle
//                 cycles between two of them;
//   ACQ_TRACKING  as ACQ_MULTI, the origin moving by (dx, dy) after each
//                 exposure;
//   ACQ_LINESCAN  row y0 read cmd.n_exp times (one line per exposure,
//                 cmd.h ignored), which rebuilds an image of n_exp lines from
//                 a matrix sensor used as a line sensor.
// Reads pause while stall is high (the buffer towards the processing part is
// nearly full). done pulses after the last pixel. The modes and their
// parameters follow the document; the sensor port and the timing are this
// design's generic choice, a real sensor needs its own driver around it.
module acq_data_control import cop_pkg::*; (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  acq_cmd_t cmd,
  input  logic     stall,
  output logic     busy,
  output logic     done,
  // sensor
  output logic     sen_expose,
  output logic     sen_rd,
  output dim_t     sen_row,
  output dim_t     sen_col,
  input  pix_t     sen_pix,
  input  logic     sen_pix_valid,
  // pixel stream
  output pix_t     pix,
  output logic     pix_valid,
  output logic [7:0] exposure   // exposures completed in this command
);
  typedef enum logic [1:0] {A_IDLE, A_INT, A_READ, A_DELAY} astate_e;
  astate_e as;
  acq_cmd_t c;
  logic [15:0] tcnt;
  dim_t  r, k;            // row and column counters inside the window
  dim_t  ox, oy;          // current window origin
  logic [7:0] nexp;
  dim_t  nrows;

  assign busy       = (as != A_IDLE);
  assign sen_expose = (as == A_INT);
  assign sen_rd     = (as == A_READ) && !stall;
  assign sen_row    = oy + dim_t'(r * (c.sub_y + 1'b1));
  assign sen_col    = ox + dim_t'(k * (c.sub_x + 1'b1));
  assign pix        = sen_pix;
  assign pix_valid  = sen_pix_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as <= A_IDLE; c <= '0; tcnt <= '0; r <= '0; k <= '0; ox <= '0; oy <= '0;
      nexp <= '0; nrows <= '0; done <= 1'b0; exposure <= '0;
    end else begin
      done <= 1'b0;
      case (as)
        A_IDLE: if (start) begin
          c <= cmd; ox <= cmd.x0; oy <= cmd.y0; exposure <= '0;
          nexp  <= (cmd.mode == ACQ_WINDOW || cmd.n_exp == 0) ? 8'd1 : cmd.n_exp;
          nrows <= (cmd.mode == ACQ_LINESCAN) ? 12'd1 : cmd.h;
          tcnt <= cmd.t_int; as <= A_INT;
        end
        A_INT: begin
          if (tcnt <= 16'd1) begin as <= A_READ; r <= '0; k <= '0; end
          tcnt <= tcnt - 1'b1;
        end
        A_READ: if (!stall) begin
          if (k == c.w - 1'b1) begin
            k <= '0;
            if (r == nrows - 1'b1) begin
              r <= '0;
              exposure <= exposure + 1'b1;
              if (exposure + 1'b1 == nexp) begin as <= A_IDLE; done <= 1'b1; end
              else begin
                if (c.mode == ACQ_TRACKING) begin
                  ox <= ox + dim_t'(c.dx); oy <= oy + dim_t'(c.dy);
                end
                tcnt <= c.t_delay;
                as <= (c.t_delay == 0) ? A_INT : A_DELAY;
                if (c.t_delay == 0) tcnt <= c.t_int;
              end
            end else r <= r + 1'b1;
          end else k <= k + 1'b1;
        end
        A_DELAY: begin
          if (tcnt <= 16'd1) begin as <= A_INT; tcnt <= c.t_int; end
          else tcnt <= tcnt - 1'b1;
        end
        default: as <= A_IDLE;
      endcase
    end
  end
endmodule
