// pass_ctrl: sequences the passes of a run (the flow of d iterations per
// trip through external memory).
//
// A run of max_iters iterations takes ceil(max_iters / D) passes. Each pass
// starts the reader on one grid buffer and the writer on the other, waits
// for the writer to finish, and swaps the buffers, so each pass reads what
// the previous one wrote. Buffer A sits at address 0 and buffer B at N*N;
// the host loads the starting grid into A. A pass normally runs all D PCMs;
// when fewer than D iterations remain, only the first n_active PCMs update
// and the others just pass the cells on. At the end done pulses and
// result_base tells where the final grid lies. max_iters = 0 finishes at
// once with the grid untouched in A.
//
// The pass structure (read, d iterations in parallel, write, repeat
// Max_Iterations/d times) is the design's; the two-buffer scheme and the
// short last pass are this implementation's choices.
module pass_ctrl #(
  parameter int unsigned N  = 1024,
  parameter int unsigned D  = 44,
  parameter int unsigned AW = 21
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [31:0]          max_iters,
  input  logic                 wr_done,
  output logic                 pass_start,
  output logic [AW-1:0]        src_base,
  output logic [AW-1:0]        dst_base,
  output logic [$clog2(D+1)-1:0] n_active,
  output logic                 busy,
  output logic                 done,
  output logic [AW-1:0]        result_base,
  output logic [31:0]          passes_done
);

  localparam int unsigned DW = $clog2(D + 1);
  localparam logic [AW-1:0] BASE_A = '0;
  localparam logic [AW-1:0] BASE_B = AW'(N * N);

  typedef enum logic [1:0] {S_IDLE, S_LAUNCH, S_WAIT} state_t;
  state_t      state;
  logic [31:0] remaining;
  logic        in_b;        // the current source grid is buffer B

  assign src_base = in_b ? BASE_B : BASE_A;
  assign dst_base = in_b ? BASE_A : BASE_B;
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      remaining   <= '0;
      in_b        <= 1'b0;
      n_active    <= '0;
      pass_start  <= 1'b0;
      done        <= 1'b0;
      result_base <= BASE_A;
      passes_done <= '0;
    end else begin
      pass_start <= 1'b0;
      done       <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          in_b        <= 1'b0;
          passes_done <= '0;
          remaining   <= max_iters;
          if (max_iters == 32'd0) begin
            done        <= 1'b1;
            result_base <= BASE_A;
          end else begin
            state <= S_LAUNCH;
          end
        end
        S_LAUNCH: begin
          n_active   <= (remaining >= 32'(D)) ? DW'(D) : DW'(remaining);
          remaining  <= (remaining >= 32'(D)) ? remaining - 32'(D) : 32'd0;
          pass_start <= 1'b1;
          state      <= S_WAIT;
        end
        S_WAIT: if (wr_done) begin
          passes_done <= passes_done + 32'd1;
          in_b        <= !in_b;
          if (remaining == 32'd0) begin
            state       <= S_IDLE;
            done        <= 1'b1;
            result_base <= dst_base;
          end else begin
            state <= S_LAUNCH;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
