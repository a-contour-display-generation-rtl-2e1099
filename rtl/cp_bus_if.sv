// System bus interface of a 2x2 cellular processor.
//
// Every clock the External Instruction register (EIR) and the External
// Data register (EDR) take the command and data word on the system bus;
// the cell acts on the registered copies one cycle later.
//
// Address assignment (reset and count): a RESET command clears every
// cell's address and Count Enable Out. The cell whose Count Enable In is
// high while RESET is in its EIR (the first cell of the chain, whose input
// the host raises with RESET) takes the RESET word in EDR, increments it by
// one and keeps the result as its address. On the next cycle it returns
// that address on the bus (ret_valid, ret_is_count) with Count Enable Out
// high. The next cell sees its Count Enable In one cycle later, registered
// alongside the returned word in its own EDR, and does the same. With
// RESET carrying a base value b the cells receive b+1, b+2, ... one every two cycles, and the last Count Enable Out
// rises when every cell has an address.
//
// Selection: ADDR compares its data with the cell's address and selects the
// cell on a match (and deselects it otherwise). WRITE stores a word into
// the selected cell's memory at a write pointer that ADDR resets to 0 and
// each WRITE advances. READ returns the word at a read pointer that ADDR
// resets to the output area (the coordinate count, then the quadruples);
// the word is on ret_data two cycles after the READ was on the bus.
// LEVEL is for every cell that has an address: it writes the contour level
// into memory and starts the control section. While the control section is
// busy the memory is its own and WRITE and READ are ignored.
//
// The count-enable chain, the increment by one, the address in the External
// Data register and the addressing of each grid delivery and coordinate
// retrieval are the source design's; the command set, the pointers and the
// two-cycle timing are this design's choices.
module cp_bus_if
  import cp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // system bus
  input  sysbus_t    bus,
  input  logic       cnt_en_in,
  output logic       cnt_en_out,
  output logic       ret_valid,
  output logic       ret_is_count,
  output word_t      ret_data,
  // to the cell
  input  logic       ctl_busy,
  output logic       mem_we,
  output logic [6:0] mem_addr,
  output word_t      mem_wdata,
  input  word_t      mem_rdata,
  output logic       mem_req,      // bus owns the memory this cycle
  output logic       start,        // start contouring
  output logic       has_addr,
  output logic       selected
);

  cmd_e              eir;
  word_t             edr;
  logic [ADDR_W-1:0] my_addr;
  logic              counted;
  logic              en_q;          // Count Enable In, registered with EDR
  logic              ret_cnt_pend;
  logic              rd_pend;
  logic [6:0]        wr_ptr, rd_ptr;
  logic              take_first, take_chain;

  assign has_addr = counted;
  // reset/enable combination: the first cell of the chain counts from the
  // RESET word itself
  assign take_first = (eir == CMD_RESET) && cnt_en_in && !counted;
  // every other cell counts from the address its neighbour returned
  assign take_chain = (eir != CMD_RESET) && en_q && !counted;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eir          <= CMD_NOP;
      edr          <= '0;
      my_addr      <= '0;
      counted      <= 1'b0;
      en_q         <= 1'b0;
      cnt_en_out   <= 1'b0;
      ret_cnt_pend <= 1'b0;
      rd_pend      <= 1'b0;
      selected     <= 1'b0;
      wr_ptr       <= '0;
      rd_ptr       <= MA_COUNT;
    end else begin
      eir          <= bus.cmd;
      edr          <= bus.data;
      rd_pend      <= 1'b0;
      ret_cnt_pend <= 1'b0;
      en_q         <= cnt_en_in;
      if (bus.cmd == CMD_RESET) begin
        // RESET entering the instruction register clears the chain
        counted    <= 1'b0;
        cnt_en_out <= 1'b0;
        en_q       <= 1'b0;
        selected   <= 1'b0;
      end else if (take_first || take_chain) begin
        // increment the address held in the External Data register and
        // return it on the next cycle, with Count Enable Out
        my_addr      <= ADDR_W'(edr + 1'b1);
        edr          <= edr + 1'b1;
        counted      <= 1'b1;
        ret_cnt_pend <= 1'b1;
        cnt_en_out   <= 1'b1;
      end
      if (eir == CMD_ADDR) begin
        selected <= counted && (edr[ADDR_W-1:0] == my_addr);
        wr_ptr   <= '0;
        rd_ptr   <= MA_COUNT;
      end
      if (eir == CMD_WRITE && selected && !ctl_busy) wr_ptr <= wr_ptr + 1'b1;
      if (eir == CMD_READ && selected && !ctl_busy) begin
        rd_ptr  <= rd_ptr + 1'b1;
        rd_pend <= 1'b1;
      end
    end
  end

  // Memory access on behalf of the bus.
  always_comb begin
    mem_we    = 1'b0;
    mem_addr  = rd_ptr;
    mem_wdata = edr;
    mem_req   = 1'b0;
    start     = 1'b0;
    if (!ctl_busy) begin
      unique case (eir)
        CMD_WRITE: if (selected) begin
          mem_req = 1'b1; mem_we = 1'b1; mem_addr = wr_ptr;
        end
        CMD_READ: if (selected) begin
          mem_req = 1'b1; mem_addr = rd_ptr;
        end
        CMD_LEVEL: if (counted) begin
          mem_req = 1'b1; mem_we = 1'b1; mem_addr = MA_LEVEL; start = 1'b1;
        end
        default: ;
      endcase
    end
  end

  // Return path: the freshly counted address, or the word read for READ.
  assign ret_valid    = ret_cnt_pend || rd_pend;
  assign ret_is_count = ret_cnt_pend;
  assign ret_data     = ret_cnt_pend ? edr : mem_rdata;

endmodule
