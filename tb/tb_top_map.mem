// end-to-end test song: one block to slice, one to miss, end marker
01881d800a400
096096000f301
7ffffffffffff
